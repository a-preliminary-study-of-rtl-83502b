// delay_line: a W-bit shift register of DEPTH stages; q is d from DEPTH clock
// edges ago. The Verlet datapath uses it to line operands up with the
// pipelined floating-point units and to carry an atom's valid bit and address
// alongside its data. DEPTH 0 is a plain wire.
module delay_line #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 5
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
    end
    assign q = stage[DEPTH-1];
  end

endmodule
