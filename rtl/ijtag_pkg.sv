// ijtag_pkg: constants and types shared by the access controllers and the
// instrument networks.
//
// Command format (two header bytes per command, sent first byte first):
//   control command: b7 = 0, b6 = 1 for write / 0 for read, then a 14-bit
//                    instrument (SIB) number, 1-based, most significant bits
//                    in the first byte.
//   data command:    b7 = 1, then a 15-bit count of payload bytes that follow.
// Instrument lengths in the benchmark network repeat 8, 16, 32 bits; the
// bridge network of the level-i IC holds iA (9), iB (8), iC (1), iD (1).
package ijtag_pkg;

  localparam int IW = 14;          // instrument index width in a control command
  localparam int CW = 15;          // payload byte count width in a data command
  localparam int LW = 6;           // instrument length width (lengths up to 63)

  // Instrument numbers in the bridge network (level-i IC).
  localparam int BR_IA = 1;        // send register: 8 data bits + data-available bit
  localparam int BR_IB = 2;        // received byte
  localparam int BR_IC = 3;        // data-arrived flag
  localparam int BR_ID = 4;        // data-consumed acknowledge
  localparam int BR_N  = 4;

  typedef enum logic [3:0] {
    S_IDLE,      // waiting for the first header byte (or an interrupt)
    S_HDR1,      // waiting for the second header byte
    S_PREP,      // data command accepted: finish SCR/ICR set-up
    S_WAIT,      // waiting for the send register to be free
    S_CFG_CAP,   // configuration scan: capture
    S_CFG_SH,    //   shift SCR into the closed SIB chain
    S_CFG_UPD,   //   update (opens the selected SIBs)
    S_DAT_CAP,   // data scan: capture
    S_DAT_SH,    //   shift the built sequence, strip the returned bits
    S_DAT_UPD,   //   update (writes instruments, closes the SIBs)
    S_NEXT,      // decide: another data scan, drain or done
    S_DRAIN      // discard payload bytes that no instrument takes
  } ctrl_state_e;

  // Length rule of the benchmark network: instrument 1 is 8 bits, 2 is 16,
  // 3 is 32, 4 is 8 again and so on.
  function automatic logic [LW-1:0] bench_len(int unsigned idx);
    unique case ((idx - 1) % 3)
      0:       return LW'(8);
      1:       return LW'(16);
      default: return LW'(32);
    endcase
  endfunction

  // Bit offset of benchmark instrument k0 (0-based) in a flat vector of all
  // instrument values; bench_bits(n) is the total length of n instruments.
  function automatic int bench_off(int k0);
    return 56 * (k0 / 3) + ((k0 % 3) == 0 ? 0 : (k0 % 3) == 1 ? 8 : 24);
  endfunction

  function automatic int bench_bits(int n);
    return bench_off(n);
  endfunction

  function automatic logic [LW-1:0] bridge_len(int unsigned idx);
    unique case (idx)
      BR_IA:   return LW'(9);
      BR_IB:   return LW'(8);
      default: return LW'(1);
    endcase
  endfunction

endpackage
