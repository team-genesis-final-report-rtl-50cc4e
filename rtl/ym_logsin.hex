859
6c3
607
58b
52e
4e4
4a6
471
443
41a
3f5
3d3
3b5
398
37e
365
34e
339
324
311
2ff
2ed
2dc
2cd
2bd
2af
2a0
293
286
279
26d
261
256
24b
240
236
22c
222
218
20f
206
1fd
1f5
1ec
1e4
1dc
1d4
1cd
1c5
1be
1b7
1b0
1a9
1a2
19b
195
18f
188
182
17c
177
171
16b
166
160
15b
155
150
14b
146
141
13c
137
133
12e
129
125
121
11c
118
114
10f
10b
107
103
0ff
0fb
0f8
0f4
0f0
0ec
0e9
0e5
0e2
0de
0db
0d7
0d4
0d1
0cd
0ca
0c7
0c4
0c1
0be
0bb
0b8
0b5
0b2
0af
0ac
0a9
0a7
0a4
0a1
09f
09c
099
097
094
092
08f
08d
08a
088
086
083
081
07f
07d
07a
078
076
074
072
070
06e
06c
06a
068
066
064
062
060
05e
05c
05b
059
057
055
053
052
050
04e
04d
04b
04a
048
046
045
043
042
040
03f
03e
03c
03b
039
038
037
035
034
033
031
030
02f
02e
02d
02b
02a
029
028
027
026
025
024
023
022
021
020
01f
01e
01d
01c
01b
01a
019
018
017
017
016
015
014
014
013
012
011
011
010
00f
00f
00e
00d
00d
00c
00c
00b
00a
00a
009
009
008
008
007
007
007
006
006
005
005
005
004
004
004
003
003
003
002
002
002
002
001
001
001
001
001
001
001
000
000
000
000
000
000
000
000
