004a0001
004b0002
00700000
00270007
003f0703
00bf0703
00aa0001
00800000
