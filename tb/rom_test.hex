000001
2aaaaa
155555
3fffff
200000
1fffff
0abcde
012345
