20090055
AC090004
8C0A0004
01495820
01696022
01696824
012B702A
00000000
