20010064
2002fff9
00221820
00612022
00220018
00002812
ac0300c8
ac0400c9
ac0500ca
8c0600c8
00c63820
ac0700cb
0041402a
ac0800cc
20090000
200a0005
21290001
152affff
ac0900d1
112a0002
20090063
ac0900d2
20150068
02a0a009
2016004d
0800001c
ac1400d0
02800008
ac1600d3
200b0041
200c0000
201f0008
ad8b2000
218c0001
201f0008
ad8b2000
218c0001
201f0008
ad8b2000
218c0001
201f0008
ad8b2000
218c0001
201f0008
ad8b2000
218c0001
201f0008
ad8b2000
218c0001
201f0008
ad8b2000
218c0001
201f0008
ad8b2000
218c0001
201f0008
ad8b2000
218c0001
201f0008
ad8b2000
218c0001
201f0014
ac004002
201f001e
ac004004
201f0001
ac004001
ac004003
20170134
40977800
3c0e7fff
01ce7820
20180001
ac1800d4
239c0001
ac1c00d6
0800004a
400d8000
20190001
12190008
ac1000cd
400e8800
ac1100ce
ac0f00cf
201a0002
409a0000
0800004a
237b0001
ac1b00d5
201a0004
409a0000
