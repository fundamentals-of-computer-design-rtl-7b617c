20090112
200A0112
200B000F
112A0003
012A4820
AD4B0064
012A4825
00000000
