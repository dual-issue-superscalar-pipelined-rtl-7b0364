20010005
20020007
00221820
00412022
200f000c
00000000
00642825
00833024
ac030000
ac040004
8c070000
8c080004
00e14820
01025020
0022582a
0041602a
206d0000
00000000
11af0003
20100064
20110037
20120042
8c130004
00000000
12640003
00000000
2011004d
20120058
20140001
20150002
10340005
0021b020
08000024
20170009
20110063
00000000
ac160008
ac170008
8c180008
20190003
08000028
00000000
