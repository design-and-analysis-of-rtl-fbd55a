9e
9d
9b
9d
9d
99
9a
9d
9a
99
9a
97
9a
9e
9e
9a
9c
9d
9b
