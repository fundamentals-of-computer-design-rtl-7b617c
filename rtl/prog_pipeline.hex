20090112
200A000A
200B000F
00000000
00000000
00000000
112A0003
012A4820
AD4B0064
012A4825
00000000
