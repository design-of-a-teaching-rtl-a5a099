00480001
00490002
004a0003
004b0004
004c0005
004d0006
004e0007
004f0008
00390204
00e80004
00b90204
00a00203
009a0203
00f00000
