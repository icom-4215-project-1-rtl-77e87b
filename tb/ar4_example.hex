7019
5900
70F4
5A00
7002
5B00
7028
5F00
6880
1900
F800
