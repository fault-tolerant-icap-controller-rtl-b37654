00111
003c6
0067b
00930
00be5
00e9a
0114f
01404
016b9
0196e
01c23
01ed8
0218d
02442
026f7
029ac
02c61
02f16
031cb
03480
03735
039ea
03c9f
03f54
04209
044be
04773
04a28
04cdd
04f92
05247
054fc
057b1
05a66
05d1b
05fd0
06285
0653a
067ef
06aa4
06d59
0700e
072c3
07578
0782d
07ae2
07d97
0804c
08301
085b6
0886b
08b20
08dd5
0908a
0933f
095f4
098a9
09b5e
09e13
0a0c8
0a37d
0a632
0a8e7
0ab9c
