00480001
00490002
004a0003
004b0004
004c0005
004d0006
004e0007
004f0008
00390204
00bd0204
00a00203
009a0203
006f0606
00e8000f
00270007
00f0000e
0040000a
004b000a
00140105
001d0105
00360105
005f005a
00540433
00a90003
00660604
004d0009
004c0008
00670704
006d0504
00f0001b
00680405
00c80021
00700000
00680504
00d80024
00700000
00d00026
00e00027
00200000
00780029
00210001
00700000
00800000
