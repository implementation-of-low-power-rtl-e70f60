// ilv_pkg: types and constants shared by the multimode block interleaver.
//
// The interleaver follows the two-step permutation of IEEE 802.16e with
// d = 16 columns. For a block of Ncbps coded bits the write address of input
// k is
//     mk = (Ncbps/16)*(k mod 16) + floor(k/16)
//     jk = s*floor(mk/s) + (mk + Ncbps - floor(16*mk/Ncbps)) mod s
// with s = 1 (BPSK, QPSK), 2 (16-QAM) or 3 (64-QAM). Writing n = Ncbps/16,
// every row of 16 addresses ("iteration" r) starts at address r and then
// steps by n (s = 1), by n+1 / n-1 (s = 2) or by n+2 / n-1 / n-1 (s = 3),
// the phase of the pattern being (r - q) mod s at column q. The address
// generator builds exactly this from a small table of n values.
//
// The depth table (mod_type, ID) -> Ncbps is taken from the document's
// depth/ID table; 16-QAM and 64-QAM ignore ID bit 2.
package ilv_pkg;

  localparam int unsigned COLS  = 16;  // d, columns of the block interleaver
  localparam int unsigned INC_W = 7;   // width of an address increment
  localparam int unsigned ITER_W = 6;  // iteration index, up to 36 rows

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'b00,
    MOD_QPSK  = 2'b01,
    MOD_16QAM = 2'b10,
    MOD_64QAM = 2'b11
  } mod_t;

  // n = Ncbps/16 for each mode and ID
  localparam int unsigned BPSK_N = 3;                                   // Ncbps 48
  localparam int unsigned QPSK_N  [8] = '{6, 9, 12, 18, 24, 27, 30, 36}; // 96..576
  localparam int unsigned QAM16_N [4] = '{12, 18, 24, 36};              // 192..576
  localparam int unsigned QAM64_N [4] = '{18, 24, 27, 36};              // 288..576

  // Rows per block (= n) of a mode.
  function automatic logic [ITER_W-1:0] rows_of(mod_t m, logic [2:0] id);
    logic [ITER_W-1:0] n;
    unique case (m)
      MOD_BPSK:  n = ITER_W'(BPSK_N);
      MOD_QPSK:  n = ITER_W'(QPSK_N[id]);
      MOD_16QAM: n = ITER_W'(QAM16_N[id[1:0]]);
      default:   n = ITER_W'(QAM64_N[id[1:0]]);
    endcase
    return n;
  endfunction

  // Block size Ncbps of a mode.
  function automatic int unsigned ncbps_of(mod_t m, logic [2:0] id);
    return COLS * int'(rows_of(m, id));
  endfunction

endpackage
