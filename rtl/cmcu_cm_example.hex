04000000044080
04000080024000
04100000300000
00000000000000
04000010800080
04000804100000
04040220000000
10000000000000
06400100000000
04000800000240
10000000000000
00000000000000
04004000402000
04020800100000
05100008000000
20000000000000
04800400000800
04020001000001
20000000000000
00000000000000
05002000000008
04000000000061
04000000003200
30000000000000
04000004081000
04008004008000
30000000000000
00000000000000
04000200040004
04010000208000
08800011000000
00000000000000
