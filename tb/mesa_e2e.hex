000
03e
07f
006
007
00d
00d
03e
072
01a
00a
03e
073
01a
032
037
013
036
0ac
030
040
017
03f
031
040
0ab
038
041
01e
03f
03a
042
022
03f
03c
043
026
03f
039
03b
03d
02f
0ab
03e
070
01a
00a
03e
001
01a
01f
01b
008
002
033
00f
00d
02f
03c
03f
03e
060
02d
005
018
03e
071
01a
010
001
1f0
03e
062
02d
044
03e
066
02d
03e
078
01a
016
026
03e
063
018
017
018
03e
07a
01a
00a
03e
074
01a
032
035
063
03f
034
066
03f
037
0ab
01a
00a
037
06d
03f
035
0ab
034
072
03f
03e
073
01a
032
034
0ab
035
0ab
004
005
021
01a
024
029
029
028
025
01c
027
019
01d
022
012
026
033
00b
037
08f
03f
02b
02a
03e
050
015
018
011
018
03e
020
00c
02c
02c
00e
02c
00f
00d
00f
03e
052
02d
005
018
023
020
009
01e
03f
03f
03e
076
01a
010
016
026
000
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
