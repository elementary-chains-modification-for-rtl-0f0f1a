1c41
2c40
3c92
4c90
5d24
6d20
7e30
