// tb_ref_pkg: reference data for the NoC testbenches, kept apart from the RTL.
//
// Holds the five path tables written out in full (one row per packet ID, the
// routers visited in order, 0-terminated), the Mp3 encoder flows with their
// packet rates, and the port layout of each router, plus a function giving the
// port a router must use for a packet. The testbenches predict every routing
// decision from this data rather than from the RTL package.
package tb_ref_pkg;
  // flows, indexed by packet ID: source node, destination node, kilo-packets/s
  int SRC  [13] = '{1, 1, 1, 2, 3, 4, 5, 6, 6, 9, 10, 11, 12};
  int DST  [13] = '{2, 3, 9, 5, 4, 5, 6, 7, 8, 10, 13, 12, 13};
  int KPPS [13] = '{74, 145, 1, 35, 17, 35, 31, 5, 6, 74, 1, 140, 17};

  // PATHS[pt][id] : routers in order, 0 = end
  int PATHS [5][13][7] = '{
    '{ '{7,3,0,0,0,0,0}, '{7,0,0,0,0,0,0}, '{7,3,6,5,0,0,0}, '{3,1,0,0,0,0,0},
       '{7,3,1,0,0,0,0}, '{1,0,0,0,0,0,0}, '{1,2,0,0,0,0,0}, '{2,4,8,0,0,0,0},
       '{2,4,0,0,0,0,0}, '{5,0,0,0,0,0,0}, '{5,2,4,0,0,0,0}, '{6,0,0,0,0,0,0},
       '{6,5,2,4,0,0,0} },
    '{ '{7,3,0,0,0,0,0}, '{7,0,0,0,0,0,0}, '{7,3,1,2,5,0,0}, '{3,1,0,0,0,0,0},
       '{7,3,1,0,0,0,0}, '{1,0,0,0,0,0,0}, '{1,2,0,0,0,0,0}, '{2,1,3,7,8,0,0},
       '{2,4,0,0,0,0,0}, '{5,0,0,0,0,0,0}, '{5,2,4,0,0,0,0}, '{6,0,0,0,0,0,0},
       '{6,5,2,4,0,0,0} },
    '{ '{7,3,0,0,0,0,0}, '{7,0,0,0,0,0,0}, '{7,3,6,5,0,0,0}, '{3,1,0,0,0,0,0},
       '{7,3,1,0,0,0,0}, '{1,0,0,0,0,0,0}, '{1,2,0,0,0,0,0}, '{2,1,3,7,8,0,0},
       '{2,1,3,7,8,4,0}, '{5,0,0,0,0,0,0}, '{5,6,3,7,8,4,0}, '{6,0,0,0,0,0,0},
       '{6,3,7,8,4,0,0} },
    '{ '{7,3,0,0,0,0,0}, '{7,0,0,0,0,0,0}, '{7,8,4,2,5,0,0}, '{3,1,0,0,0,0,0},
       '{7,3,1,0,0,0,0}, '{1,0,0,0,0,0,0}, '{1,3,7,8,4,2,0}, '{2,4,8,0,0,0,0},
       '{2,4,0,0,0,0,0}, '{5,0,0,0,0,0,0}, '{5,2,4,0,0,0,0}, '{6,0,0,0,0,0,0},
       '{6,3,7,8,4,0,0} },
    '{ '{7,8,4,2,5,6,3}, '{7,0,0,0,0,0,0}, '{7,8,4,2,5,0,0}, '{3,6,5,2,1,0,0},
       '{7,8,4,2,1,0,0}, '{1,0,0,0,0,0,0}, '{1,2,0,0,0,0,0}, '{2,4,8,0,0,0,0},
       '{2,4,0,0,0,0,0}, '{5,0,0,0,0,0,0}, '{5,2,4,0,0,0,0}, '{6,0,0,0,0,0,0},
       '{6,5,2,4,0,0,0} }
  };

  // links avoided by each alternative table, as router pairs
  int AVOID [5][2][2] = '{ '{'{0,0},'{0,0}}, '{'{3,6},'{4,8}}, '{'{2,4},'{2,5}},
                           '{'{1,2},'{5,6}}, '{'{1,3},'{3,7}} };

  // link list, same order as the design's link ports
  int LA [9] = '{1, 1, 2, 2, 3, 3, 4, 5, 7};
  int LB [9] = '{2, 3, 4, 5, 6, 7, 8, 6, 8};

  // router port layout: positive = router, negative = node, 0 = unused
  int PEER [9][4] = '{
    '{0,0,0,0},
    '{2, 3, -4, -5},  '{1, 4, 5, -6},  '{1, 6, 7, -2},  '{2, 8, -8, -13},
    '{2, 6, -9, -10}, '{3, 5, -11, -12}, '{3, 8, -1, -3}, '{4, 7, -7, 0}
  };

  function automatic int path_len(int pt, int id);
    int n = 0;
    for (int k = 0; k < 7; k++) if (PATHS[pt][id][k] != 0) n++;
    return n;
  endfunction

  // Port router r uses for packet id under table pt; -1 if r is not on the path.
  function automatic int exp_port(int r, int pt, int id);
    int res = -1;
    int n = path_len(pt, id);
    for (int k = 0; k < n; k++)
      if (PATHS[pt][id][k] == r)
        for (int p = 0; p < 4; p++)
          if ((k == n - 1 && PEER[r][p] == -DST[id]) ||
              (k <  n - 1 && PEER[r][p] == PATHS[pt][id][k+1])) res = p;
    return res;
  endfunction

  function automatic int link_of(int a, int b);
    int res = -1;
    for (int l = 0; l < 9; l++)
      if ((LA[l] == a && LB[l] == b) || (LA[l] == b && LB[l] == a)) res = l;
    return res;
  endfunction
endpackage
