// pipe_delay: a W-bit, DEPTH-stage register chain with a valid bit.
//
// Used by the operators to bring their internal pipeline up to a fixed,
// documented latency. DEPTH = 0 is a plain wire. The valid bit is cleared by
// the synchronous active-high reset; the data registers are not reset.
module pipe_delay #(
  parameter int W     = 8,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [DEPTH-1:0] v_q;
    logic [W-1:0]     d_q [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) v_q <= '0;
      else     v_q <= (v_q << 1) | DEPTH'(in_valid);
      d_q[0] <= in_data;
      for (int i = 1; i < DEPTH; i++) d_q[i] <= d_q[i-1];
    end
    assign out_valid = v_q[DEPTH-1];
    assign out_data  = d_q[DEPTH-1];
  end
endmodule
