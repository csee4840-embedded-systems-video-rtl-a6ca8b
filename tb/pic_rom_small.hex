03
04
05
06
07
08
09
0a
13
14
15
16
17
18
19
1a
