// rf_pkg - constants and tables shared by the ray finder gate array and the
// ray finder board.
//
// The gate array has 45 pad pins named P11..P18 (chamber 1), P21..P29
// (chamber 2), P31..P314 (chamber 3) and P41..P414 (chamber 4).  In this RTL
// they form one vector pin[44:0] in that order:
//   P1n -> n-1, P2n -> 8+n-1, P3n -> 17+n-1, P4n -> 31+n-1.
// Rays are numbered 1..31 in the documentation and 0..30 in vectors.
//
// The tables below are taken from the published gate array description:
//   * RAY_PAD     - which four pins define each ray (ray/pin allocation table)
//   * RAY_DIRECT  - the pin that stands for each ray in direct mode
//   * the 236-bit configuration map (30 addresses x 8 bits, 4 unused):
//       bit 0          mode control (1 = direct mode)
//       bits 1..31     enable ray 1..31
//       bits 32..76    preset of pin 0..44 ('3 out of 4' option)
//       bits 77..231   155 programmable OR bits, pipe 1 first, rays ascending
//       bits 232..234  pipeline length code (length = code + 1 clocks)
//       bit 235        'Pipe Enable*': 0 reassigns ray 20 as pipeline enable
//   * PIPE_LO/HI  - which rays each of the 8 ORs can take
// and, for the board, the patch area of the prototype board (histogram bin 9)
// given as pad codes chamber*1000+pad.  The allocation of gate array 5 is left
// open here: its pins are tied low, as are those of gate arrays 7 and 8, which
// the prototype does not need.
package rf_pkg;

  localparam int unsigned NPIN      = 45;
  localparam int unsigned NRAY      = 31;
  localparam int unsigned NPIPE     = 8;
  localparam int unsigned NCFG_ADDR = 30;
  localparam int unsigned NCFG_BITS = 236;
  localparam int unsigned NOR_BITS  = 155;

  // configuration bit positions
  localparam int unsigned CFG_MODE      = 0;
  localparam int unsigned CFG_EN0       = 1;    // enable of ray 1
  localparam int unsigned CFG_PRESET0   = 32;   // preset of pin 0 (P11)
  localparam int unsigned CFG_OR0       = 77;   // first OR bit
  localparam int unsigned CFG_LEN0      = 232;  // pipeline length code, 3 bits
  localparam int unsigned CFG_PIPE_EN_N = 235;

  // pin index from chamber (1..4) and pad number within the chip (1..14)
  function automatic int unsigned pin_of(input int unsigned ch, input int unsigned n);
    case (ch)
      1:       return n - 1;
      2:       return 8 + n - 1;
      3:       return 17 + n - 1;
      default: return 31 + n - 1;
    endcase
  endfunction

  // Four pins per ray, chamber 1..4 order.  Encoded as chamber*100+pad.
  localparam int unsigned RAY_PAD [NRAY][4] = '{
    '{101,201,301,401}, '{101,202,301,401}, '{101,202,302,402}, '{102,202,302,402},
    '{102,202,303,403}, '{102,203,303,403}, '{102,203,304,404}, '{103,203,304,404},
    '{103,203,305,405}, '{103,204,305,405}, '{103,204,306,406}, '{104,204,306,406},
    '{104,204,307,407}, '{104,205,307,407}, '{104,205,308,408}, '{105,205,308,408},
    '{105,205,309,409}, '{105,206,309,409}, '{105,206,310,410}, '{106,206,310,410},
    '{106,206,311,411}, '{106,207,311,411}, '{106,207,312,412}, '{107,207,312,412},
    '{107,207,313,412}, '{107,208,313,412}, '{107,208,313,413}, '{108,208,313,413},
    '{108,208,314,413}, '{108,209,314,413}, '{108,209,314,414}
  };

  // Direct-mode pin of each ray, same encoding.
  localparam int unsigned RAY_DIRECT [NRAY] = '{
    301, 401, 302, 402, 303, 403, 304, 404, 305, 405, 306, 406, 307, 407, 308, 408,
    309, 409, 310, 410, 311, 411, 312, 412, 207, 313, 413, 208, 314, 209, 414
  };

  function automatic int unsigned ray_pin(input int unsigned r, input int unsigned c);
    return pin_of(RAY_PAD[r][c] / 100, RAY_PAD[r][c] % 100);
  endfunction

  function automatic int unsigned direct_pin(input int unsigned r);
    return pin_of(RAY_DIRECT[r] / 100, RAY_DIRECT[r] % 100);
  endfunction

  // Ray range (1-based, inclusive) of each programmable OR.
  localparam int unsigned PIPE_LO [NPIPE] = '{1, 1, 1, 1, 1, 9, 17, 25};
  localparam int unsigned PIPE_HI [NPIPE] = '{8, 16, 24, 31, 31, 31, 31, 31};

  // First configuration bit of OR p (0-based p).
  function automatic int unsigned or_base(input int unsigned p);
    int unsigned b;
    b = CFG_OR0;
    for (int unsigned q = 0; q < p; q++) b += PIPE_HI[q] - PIPE_LO[q] + 1;
    return b;
  endfunction

  // Configuration bit of 'ray r to pipe p' (both 0-based), or -1 if none.
  function automatic int or_bit(input int unsigned r, input int unsigned p);
    if (r + 1 < PIPE_LO[p] || r + 1 > PIPE_HI[p]) return -1;
    return int'(or_base(p) + r + 1 - PIPE_LO[p]);
  endfunction

  // ---------------------------------------------------------------------
  // Board level
  // ---------------------------------------------------------------------
  localparam int unsigned NPADS     = 166;
  localparam int unsigned NGA_RAY   = 8;    // ray gate arrays per board
  localparam int unsigned NGA_BT    = 2;    // big tower gate arrays per board
  localparam int unsigned PAD_NONE  = 255;  // pin tied to ground

  // Pad bus layout: the pads used by the prototype board, chamber by chamber.
  // chamber:          1   2   3   4   5   6
  localparam int unsigned PAD_FIRST [6] = '{23, 22, 1,  1,  5,  4};
  localparam int unsigned PAD_LAST  [6] = '{59, 60, 19, 19, 20, 20};

  // Bus index of a pad code (chamber*1000+pad), PAD_NONE for 0 (ground).
  // Code 9000+n is spare line n of the bus (index 150+n), used only for
  // programming (see PATCH_PE_CODE).
  function automatic int unsigned pad_index(input int unsigned code);
    int unsigned c, n, base;
    if (code == 0) return PAD_NONE;
    c = code / 1000;
    n = code % 1000;
    if (c == 9) return 150 + n;
    base = 0;
    for (int unsigned k = 1; k < c; k++) base += PAD_LAST[k-1] - PAD_FIRST[k-1] + 1;
    return base + n - PAD_FIRST[c-1];
  endfunction

  // Patch area, normal operation (PE low).  Pin order P11..P18, P21..P29,
  // P31..P314, P41..P414.  0 = ground.
  localparam int unsigned PATCH_CODE [NGA_RAY][NPIN] = '{
    // gate array 1
    '{1023,1024,1025,1026,1027,1028,1029,1030,
      2022,2023,2024,2025,2026,2027,2028,2029,2030,
      4001,4001,4002,4002,4003,4003,4004,4004,4005,4005,4006,4006,4007,4008,
      3001,3002,3002,3003,3003,3004,3004,3005,3005,3006,3006,3007,3008,3009},
    // gate array 2
    '{2030,2031,2032,2031,2032,2033,2034,2035,
      1031,1031,1031,1032,1032,1032,1033,1034,1035,
      4009,4009,4009,4010,4011,4010,4012,4010,4011,4011,4012,4012,4013,4014,
      3009,3010,3009,3010,3010,3010,   0,3011,3011,3011,3011,3012,3013,3014},
    // gate array 3
    '{2041,2041,2041,2040,2039,2038,2037,2036,
         0,1041,1040,1040,1039,1038,1037,1036,1035,
      5020,5020,5019,5020,5020,3019,3018,3018,3017,3017,3016,3016,3015,3014,
      6020,6019,6019,6020,6019,4019,4019,4018,4018,4017,4017,4016,4015,4014},
    // gate array 4
    '{1041,1041,1042,1042,1042,1043,1043,1044,
      2041,2042,2042,2042,2043,2043,2043,2044,2045,
      6020,6018,6018,6019,6017,6018,6018,6017,6017,6018,6016,6017,6016,6015,
      5020,5018,5019,5019,5018,5018,5019,5017,5018,5018,5017,5017,5016,5015},
    // gate array 5 (allocation left open: tied low)
    '{default: 0},
    // gate array 6
    '{5009,5009,5008,5007,5006,5006,5005,   0,
      6009,6009,6008,6007,6006,6005,6005,6004,   0,
      2052,2053,2053,2054,2055,2056,2057,2057,2058,2058,2059,2059,2060,   0,
      1051,1051,1052,1053,1053,1054,1055,1056,1056,1057,1057,1058,1059,   0},
    // gate arrays 7 and 8 (not needed by the prototype)
    '{default: 0},
    '{default: 0}
  };

  // Patch area while the chip's PE is high (external 2-to-1 multiplexers).
  // 0 = same pad as in normal operation.
  // Gate array 1 has no published entries, yet pins P31/P32, P42/P43,
  // P33/P34, P44/P45 and P35/P36 share pads; this design switches P32, P43,
  // P34, P45 and P36 to spare lines 1..5 (bus 151..155) while PE is high.
  localparam int unsigned PATCH_PE_CODE [NGA_RAY][NPIN] = '{
    '{0,0,0,0,0,0,0,0, 0,0,0,0,0,0,0,0,0,
      0,9001,0,9003,0,9005,0,0,0,0,0,0,0,0,
      0,0,9002,0,9004,0,0,0,0,0,0,0,0,0},
    // gate array 2: P32, P33, P36, P43, P44, P45, P46
    '{0,0,0,0,0,0,0,0, 0,0,0,0,0,0,0,0,0,
      0,4013,4014,0,0,4015,0,0,0,0,0,0,0,0,
      0,0,3011,3012,3013,3014,0,0,0,0,0,0,0,0},
    // gate array 3: P32, P34, P35, P43, P44, P45
    '{0,0,0,0,0,0,0,0, 0,0,0,0,0,0,0,0,0,
      0,3017,0,3016,3015,0,0,0,0,0,0,0,0,0,
      0,0,4018,4017,4016,0,0,0,0,0,0,0,0,0},
    // gate array 4: P33, P36, P37, P44, P45, P46
    '{0,0,0,0,0,0,0,0, 0,0,0,0,0,0,0,0,0,
      0,0,6016,0,0,6015,6014,0,0,0,0,0,0,0,
      0,0,0,5017,5016,5015,0,0,0,0,0,0,0,0},
    '{default: 0},
    // gate array 6: P33, P42, P45
    '{0,0,0,0,0,0,0,0, 0,0,0,0,0,0,0,0,0,
      0,0,2058,0,0,0,0,0,0,0,0,0,0,0,
      0,1055,0,0,1056,0,0,0,0,0,0,0,0,0},
    '{default: 0},
    '{default: 0}
  };

  // Bus index of the pad wired to pin j of ray gate array g (0-based), in
  // normal operation (pe_sel = 0) or while the chip's PE is high (pe_sel = 1).
  function automatic int unsigned patch_pad(input int unsigned g, input int unsigned j,
                                            input bit pe_sel);
    if (pe_sel && PATCH_PE_CODE[g][j] != 0) return pad_index(PATCH_PE_CODE[g][j]);
    return pad_index(PATCH_CODE[g][j]);
  endfunction

  // Four pads that carry the chip address to the chip-select decoder
  // (bus lines unused by the prototype patch area).
  localparam int unsigned DEC_PAD [4] = '{147, 148, 149, 150};

  // Inputs of the two big tower gate arrays (gate arrays 9 and 10):
  // 0 = ground, 1 = Bin Select, 100+10*g+k = output k of gate array g.
  localparam int unsigned BT_SRC [NGA_BT][NPIN] = '{
    // gate array 9: big towers 1..8
    '{0,0,0,0,0,0,0,0,
      0,0,0,0,0,0,118,128,0,
      111,113,115,125,116,126,131,0,117,127,0,0,123,0,
      112,114,132,133,121,134,0,0,122,1,0,0,124,0},
    // gate array 10: big towers 9..16
    '{0,0,0,0,0,0,0,0,
      0,0,0,0,0,0,164,155,0,
      121,122,138,127,137,136,135,152,134,153,163,145,132,165,
      125,126,123,124,128,142,143,162,144,1,133,154,146,0}
  };

  // Source of pin j of big tower gate array b (0 = GA 9), see BT_SRC.
  function automatic int unsigned bt_src(input int unsigned b, input int unsigned j);
    return BT_SRC[b][j];
  endfunction

endpackage
