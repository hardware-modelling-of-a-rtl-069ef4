3c04ffff
3484fffe
20050004
0c000007
ac020080
ac030084
00850019
00001810
00001012
03e00008
