20080008
2009ffff
200a0001
11000005
012a5820
01404820
01605020
2108ffff
1000fffa
1000ffff
