05a
17d
2a0
3c3
4e6
609
72c
84f
972
a95
bb8
cdb
dfe
f21
044
167
