0000000000000000
0000000000000000
0000000000000000
2800000000000000
5000000000000000
2000000000000000
3999999999999800
e6666666666668fe
d000000000000000
1800000000000000
ecccccccccccd000
0cccccccccccd001
2000000000000000
f000000000000000
1cccccccccccd000
f999999999999800
