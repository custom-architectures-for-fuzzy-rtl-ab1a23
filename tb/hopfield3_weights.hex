00
28
ba
28
00
5a
ba
5a
00
