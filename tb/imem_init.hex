a5a50000
a5a50011
a5a50022
a5a50033
a5a50044
a5a50055
a5a50066
a5a50077
