// preset_logic: controller of the address generator (the "preset logic").
//
// A 4-bit column counter marks the 16 addresses of one row (iteration) of the
// interleaver and a row counter tells which row is being generated. The state
// machine has two states: S_CLR, in which the accumulator holds 0 (first
// address of a block; entered on clr, at the end of a block and after a mode
// change), and S_ITER for every other address. At column 15 the row ends:
//   - if more rows follow, the accumulator is preset to the next row index
//     (row r starts at address r), the T flip-flop holds and the mod-3
//     counter steps up once (on every other clock it steps down), so the
//     next row starts with the right increment;
//   - after the last row (n = Ncbps/16 rows) the accumulator and both phase
//     counters are cleared and blk_last tells the address generator to swap
//     the memory banks.
// mod_type and ID are registered in cfg_mod/cfg_id; the rest of the address
// generator decodes those. When the inputs differ from the registered values
// (a new modulation or depth), restart clears the sequence back to S_CLR.
// All outputs except the registered cfg_* are combinational from the state.
// clr is synchronous and active high.
// The column counter, the accumulator preset at each row and the clear state
// follow the document; the row counter, the way the phase counters are
// adjusted at row ends and the mode-change restart are this design's choices.
module preset_logic
  import ilv_pkg::*;
#(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              clr,
  input  mod_t              mod_type,
  input  logic [2:0]        id,
  output mod_t              cfg_mod,     // registered mode
  output logic [2:0]        cfg_id,      // registered depth select
  output logic              ph_clr,      // clear accumulator, T flip-flop, mod-3 counter
  output logic              acc_load,    // preset accumulator with acc_preset
  output logic [ADDR_W-1:0] acc_preset,  // start address of the next row
  output logic              tff_t,       // toggle the T flip-flop
  output logic              m3_up,       // step it up (row end) instead of down
  output logic              row_end,     // column 15 of a row
  output logic              blk_last,    // last address of a block
  output logic              restart      // mode change seen
);
  typedef enum logic {S_CLR, S_ITER} state_t;

  state_t            state;
  logic [3:0]        col;
  logic [ITER_W-1:0] row;
  logic [ITER_W-1:0] rows;

  assign rows     = rows_of(cfg_mod, cfg_id);
  assign restart  = !clr && ((mod_type != cfg_mod) || (id != cfg_id));
  assign row_end  = (col == 4'd15);
  assign blk_last = row_end && (row == rows - 1'b1);

  assign ph_clr     = clr || restart || blk_last;
  assign acc_load   = row_end && !blk_last;
  assign acc_preset = ADDR_W'(row) + 1'b1;
  assign tff_t      = !row_end;
  assign m3_up      = row_end;

  always_ff @(posedge clk) begin
    if (clr || restart) begin
      state   <= S_CLR;
      col     <= '0;
      row     <= '0;
      cfg_mod <= mod_type;
      cfg_id  <= id;
    end else begin
      col <= col + 1'b1;           // wraps 15 -> 0 at the end of a row
      if (blk_last) begin
        state <= S_CLR;
        row   <= '0;
      end else begin
        state <= S_ITER;
        if (row_end) row <= row + 1'b1;
      end
    end
  end

  // the clear state is exactly the first address of a block
  assert property (@(posedge clk) disable iff (clr || restart)
                   (state == S_CLR) == (col == 4'd0 && row == '0));
endmodule
