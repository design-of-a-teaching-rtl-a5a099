00000000
00000011
00000022
3fc00000
40300000
00000008
0f0f0f0f
80000001
00000007
