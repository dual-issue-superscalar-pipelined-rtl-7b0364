20080001
20090001
01098020
01285022
210b0000
00000000
120a0003
014b5020
08100006
00000000
20080007
20090007
