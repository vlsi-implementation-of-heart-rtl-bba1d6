000
004
006
007
01e
01e
03c
004
005
009
00a
005
00c
00d
00e
002
00d
00d
00e
00d
00e
00d
00f
00d
00f
004
005
009
010
001
1f0
015
004
005
009
00a
009
016
017
009
018
009
016
017
019
018
002
029
009
016
017
019
018
004
021
01c
036
09e
004
006
016
01a
010
026
018
004
021
006
01f
00d
00f
00d
00f
011
011
011
011
011
011
011
011
011
011
005
01a
024
025
018
004
005
01a
00a
016
024
017
012
004
006
010
026
02b
033
01a
007
025
027
012
026
028
035
064
004
006
007
004
006
024
010
005
01a
016
026
012
021
01a
010
017
00b
025
006
00c
016
004
021
006
01e
00f
00d
00f
011
022
017
025
018
01f
016
01a
01b
00f
00d
00f
011
022
017
019
029
002
081
004
021
01a
010
004
005
01a
016
017
00b
03e
001
01a
00c
01b
00e
002
0ac
01b
00e
01b
03e
001
006
008
01e
002
0b6
008
01b
00f
00d
00f
02f
0c3
036
0ca
030
004
005
01a
010
001
1f0
004
021
01d
004
021
01a
010
004
005
01a
016
017
00b
03e
001
01a
01f
01b
008
002
0db
01b
008
01b
00f
00d
00f
011
040
0ea
036
0f1
004
005
01a
010
001
1f0
031
004
01a
020
01b
00f
00d
00f
004
021
006
010
001
1f0
011
004
021
01d
004
006
00a
021
01a
032
037
03a
004
021
01a
010
004
005
01a
00a
016
017
02a
029
025
005
006
00c
016
004
021
006
01e
00f
00d
00f
011
022
017
025
018
029
002
117
043
12c
004
021
01a
00a
021
006
032
035
03a
004
005
01a
00a
016
021
01a
010
017
02a
02b
01c
01a
010
016
017
012
005
005
005
010
017
018
002
148
010
017
005
018
025
03f
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
004
005
006
00a
011
012
013
02e
011
012
014
011
005
002
1f9
003
