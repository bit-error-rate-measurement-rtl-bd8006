00004b5b
00000000
00000000
00000000
000048f6
00000000
00004786
00000000
0000467d
000045ac
00004500
0000446d
ff1c43ec
ff454314
ff624261
ff7641c8
ff194141
ff414060
ff5e3fa5
ff723f06
ff113e78
ff3b3d8d
ff583ccb
ff6d3c24
ff073b8f
ff323a99
ff5039cc
ff65391d
fefa3880
ff27377c
ff4636a4
ff5d35ea
feeb3544
ff193430
ff39334a
ff523284
fed731d3
ff0830ab
ff2a2fb4
ff442edf
febf2e20
fef32ce0
ff172bd4
ff322aec
fe9f2a1a
fed728bb
fefe2793
ff1b2691
fe7425a7
feaf241d
fed922cd
fef821a7
fe34209a
fe731ed0
fe9f1d43
febf1be3
fdc41a9e
fe021863
fe2a1666
fe441491
00000000
00000000
00000000
00000000
00000017
00000000
00000000
00000000
00000020
00000000
00000027
00000000
0000002d
00000033
00000037
0000003c
00080040
00070048
0006004e
00060055
000b005b
000a0065
0009006f
00080078
000f0080
000e008f
000d009d
000c00a9
001500b5
001300cb
001200de
001100f0
001e0100
001b011f
0019013a
00170153
002b016b
00270196
002401bc
002101e0
003d0202
0037023e
00330275
002f02a8
005702d8
004f032e
0048037d
004403c5
007c0409
00710485
006804f6
0062055e
00b405c1
00a50675
009a071a
009107b4
010f0847
00fc0955
00ee0a51
00e50b3f
01b70c25
01a90ddb
01a60f83
01ad1129
000012d7
00000000
00000000
00000000
