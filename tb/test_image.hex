a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
a5
a5
a2
a7
a4
a1
a6
a3
a0
a5
a2
a7
a4
a1
a6
a3
a0
