00000000
000000a5
00000008
