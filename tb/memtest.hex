20100005
2011000c
02304022
02304824
02305025
0211582a
0230602a
ac08003c
ae2a0004
8c12003c
8c130010
0253a020
2015fffd
02a0b02a
12c00001
1000ffff
