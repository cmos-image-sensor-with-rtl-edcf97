// column_scanner: column output scanner.
//
// After a conversion the 256 decimation latches hold one code each. On start
// the scanner walks the columns 0..255, one per clock, and presents each code
// on dout with dout_valid and its column index; the tag given with start
// (the conversion slot number) is carried along. A scan takes 256 clocks,
// shorter than one conversion, so the latches are free again before they are
// overwritten. start while a scan runs is a protocol error.
//
// The scanner itself is named in the design description; its one-code-per-
// clock order and the tag are this implementation's choice.
module column_scanner
  import cs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tag,
  input  code_t      codes [COLS],
  output code_t      dout,
  output logic       dout_valid,
  output logic [7:0] dout_idx,
  output logic [7:0] dout_tag,
  output logic       busy
);

  logic [7:0] idx_q;
  logic       act_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      idx_q    <= '0;
      act_q    <= 1'b0;
      dout_tag <= '0;
    end else if (start) begin
      idx_q    <= '0;
      act_q    <= 1'b1;
      dout_tag <= tag;
    end else if (act_q) begin
      idx_q <= idx_q + 8'd1;
      if (idx_q == 8'(COLS - 1)) act_q <= 1'b0;
    end

  assign dout       = codes[idx_q];
  assign dout_valid = act_q;
  assign dout_idx   = idx_q;
  assign busy       = act_q;

  always_ff @(posedge clk)
    if (start) assert (!act_q) else $error("column_scanner: start during a scan");

endmodule
