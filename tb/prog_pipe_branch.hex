20090001
200A0001
00000000
00000000
00000000
112A0005
200B0011
200C0022
200D0033
200E0044
200F0055
20100066
00000000
