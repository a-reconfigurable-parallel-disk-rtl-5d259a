2468
37bf
4b16
5e6d
71c4
851b
9872
abc9
bf20
d277
e5ce
f925
0c7c
1fd3
332a
4681
59d8
6d2f
8086
93dd
a734
ba8b
cde2
e139
f490
07e7
1b3e
2e95
41ec
5543
689a
7bf1
