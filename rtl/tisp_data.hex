00000000
00000000
00000000
3fc00000
40300000
00000008
12345678
cafef00d
00000001
00000003
00000000
