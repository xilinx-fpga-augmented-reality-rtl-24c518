430c104304104380
430c104104304380
c10c30c30c304078
c10c30c10c104078
410c30430c104007
410c304104104007
c30c10c3043043f8
c30c10c10c3043f8
c30410c1041043ff
c30410410c1043ff
c10c10430430c1bb
c10c10c30c30c1bb
