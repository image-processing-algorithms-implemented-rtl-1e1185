2a
31
34
2f
32
2f
3c
6a
