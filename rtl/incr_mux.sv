// incr_mux: three-level multiplexer tree that selects the address increment.
//
// Level 1: four 2:1 muxes hold the 16-QAM increment pairs (n+1, n-1), chosen
//          by the T flip-flop, and four 3:1 muxes hold the 64-QAM triples
//          (n+2, n-1, n-1), chosen by the mod-3 counter.
// Level 2: three muxes steered by the 3-bit ID: an 8:1 mux of the equally
//          spaced QPSK increments, a 4:1 mux of the 16-QAM level-1 outputs
//          and a 4:1 mux of the 64-QAM level-1 outputs.
// Level 3: a 4:1 mux steered by mod_type picks the BPSK constant or one of
//          the three level-2 outputs.
// Purely combinational; the 7-bit result is zero-padded before the adder.
// The tree shape follows the document. The constants are computed from the
// permutation equations (n = Ncbps/16, see ilv_pkg) rather than copied from a
// drawing, and they reproduce the document's tabulated address sequences.
module incr_mux
  import ilv_pkg::*;
(
  input  mod_t             mod_type,
  input  logic [2:0]       id,
  input  logic             tff_q,   // 16-QAM phase
  input  logic [1:0]       m3_q,    // 64-QAM phase
  output logic [INC_W-1:0] inc
);
  logic [INC_W-1:0] l1_qam16 [4];
  logic [INC_W-1:0] l1_qam64 [4];
  logic [INC_W-1:0] l2_qpsk, l2_qam16, l2_qam64;

  // level 1
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      l1_qam16[i] = tff_q ? INC_W'(QAM16_N[i] - 1) : INC_W'(QAM16_N[i] + 1);
      unique case (m3_q)
        2'd0:    l1_qam64[i] = INC_W'(QAM64_N[i] + 2);
        2'd1:    l1_qam64[i] = INC_W'(QAM64_N[i] - 1);
        default: l1_qam64[i] = INC_W'(QAM64_N[i] - 1);
      endcase
    end
  end

  // level 2
  always_comb begin
    l2_qpsk  = INC_W'(QPSK_N[id]);
    l2_qam16 = l1_qam16[id[1:0]];
    l2_qam64 = l1_qam64[id[1:0]];
  end

  // level 3
  always_comb begin
    unique case (mod_type)
      MOD_BPSK:  inc = INC_W'(BPSK_N);
      MOD_QPSK:  inc = l2_qpsk;
      MOD_16QAM: inc = l2_qam16;
      default:   inc = l2_qam64;
    endcase
  end
endmodule
