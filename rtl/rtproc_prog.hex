20140050
201f0060
ac004004
201f02c0
ac004002
201f0060
ac004002
201f02c0
ac004002
201f0060
ac004004
201f02c0
ac004002
201f0060
ac004002
201f02c0
00000820
201f02c0
ac004002
201f0060
ac004002
20210001
2822001f
1440fffa
00000820
00001020
201f0060
ac004002
201f002f
ac004002
00201820
00740018
00001812
8c681000
201f0008
ac482000
ac004001
20040000
20630001
8c681000
201f0008
ac482000
20840001
28850050
14a0fffa
201f0001
201f0010
ac004001
20420001
28450010
14a0ffe8
20210001
2825001e
14a0ffe4
20010000
201f0060
ac004002
201f02c0
ac004002
20210001
2825000a
14a0ffc4
08000001
