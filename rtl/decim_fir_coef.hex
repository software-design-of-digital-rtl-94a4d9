fffd
fffd
fffd
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffd
fffd
fffd
fffd
fffd
fffd
fffd
fffd
fffe
fffe
fffe
fffe
fffe
ffff
ffff
ffff
0000
0000
0000
0001
0001
0001
0002
0002
0003
0003
0004
0004
0005
0005
0006
0006
0007
0007
0008
0009
0009
000a
000a
000b
000b
000c
000d
000d
000e
000e
000f
000f
0010
0010
0011
0011
0012
0012
0012
0013
0013
0013
0013
0013
0013
0013
0013
0013
0013
0013
0012
0012
0012
0011
0010
0010
000f
000e
000d
000c
000b
000a
0009
0008
0006
0005
0003
0002
0000
ffff
fffd
fffb
fff9
fff7
fff5
fff3
fff1
ffef
ffec
ffea
ffe8
ffe6
ffe3
ffe1
ffdf
ffdc
ffda
ffd8
ffd5
ffd3
ffd1
ffce
ffcc
ffca
ffc8
ffc6
ffc4
ffc2
ffc1
ffbf
ffbd
ffbc
ffbb
ffba
ffb9
ffb8
ffb7
ffb6
ffb6
ffb6
ffb6
ffb6
ffb6
ffb7
ffb8
ffb9
ffba
ffbb
ffbd
ffbf
ffc1
ffc4
ffc6
ffc9
ffcd
ffd0
ffd4
ffd8
ffdc
ffe0
ffe5
ffea
fff0
fff5
fffb
0001
0007
000e
0015
001c
0023
002b
0032
003a
0043
004b
0053
005c
0065
006e
0077
0081
008a
0094
009e
00a8
00b1
00bb
00c5
00d0
00da
00e4
00ee
00f8
0102
010c
0116
0120
012a
0134
013d
0147
0150
015a
0163
016b
0174
017d
0185
018d
0195
019c
01a3
01aa
01b1
01b7
01bd
01c3
01c8
01cd
01d2
01d6
01da
01de
01e1
01e4
01e6
01e8
01ea
01eb
01ec
01ec
01f2
01ec
01eb
01ea
01e8
01e6
01e4
01e1
01de
01da
01d6
01d2
01cd
01c8
01c3
01bd
01b7
01b1
01aa
01a3
019c
0195
018d
0185
017d
0174
016b
0163
015a
0150
0147
013d
0134
012a
0120
0116
010c
0102
00f8
00ee
00e4
00da
00d0
00c5
00bb
00b1
00a8
009e
0094
008a
0081
0077
006e
0065
005c
0053
004b
0043
003a
0032
002b
0023
001c
0015
000e
0007
0001
fffb
fff5
fff0
ffea
ffe5
ffe0
ffdc
ffd8
ffd4
ffd0
ffcd
ffc9
ffc6
ffc4
ffc1
ffbf
ffbd
ffbb
ffba
ffb9
ffb8
ffb7
ffb6
ffb6
ffb6
ffb6
ffb6
ffb6
ffb7
ffb8
ffb9
ffba
ffbb
ffbc
ffbd
ffbf
ffc1
ffc2
ffc4
ffc6
ffc8
ffca
ffcc
ffce
ffd1
ffd3
ffd5
ffd8
ffda
ffdc
ffdf
ffe1
ffe3
ffe6
ffe8
ffea
ffec
ffef
fff1
fff3
fff5
fff7
fff9
fffb
fffd
ffff
0000
0002
0003
0005
0006
0008
0009
000a
000b
000c
000d
000e
000f
0010
0010
0011
0012
0012
0012
0013
0013
0013
0013
0013
0013
0013
0013
0013
0013
0013
0012
0012
0012
0011
0011
0010
0010
000f
000f
000e
000e
000d
000d
000c
000b
000b
000a
000a
0009
0009
0008
0007
0007
0006
0006
0005
0005
0004
0004
0003
0003
0002
0002
0001
0001
0001
0000
0000
0000
ffff
ffff
ffff
fffe
fffe
fffe
fffe
fffe
fffd
fffd
fffd
fffd
fffd
fffd
fffd
fffd
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffc
fffd
fffd
fffd
