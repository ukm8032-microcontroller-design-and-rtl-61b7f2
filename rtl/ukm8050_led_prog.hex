74 FE
F5 90
7F 03
DF FE
23
80 F7
