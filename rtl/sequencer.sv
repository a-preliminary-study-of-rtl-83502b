// sequencer: the single controller shared by all cells of the pipelined fabric.
//
// Because every floating-point unit is pipelined and all cells advance in
// lock step, one controller drives every cell (SIMD mode). A Start pulse
// makes it present the atom addresses prog_addr, prog_addr+1, ... up to and
// including addr_stop, one per cycle, with seq_valid high (the range wraps
// around the memory if addr_stop < prog_addr). It then waits for the last atom
// to leave the pipeline and raises Stop in the cycle from which that atom's
// result can be read, CELL_LAT (= 22) cycles after its address was presented.
// Stop stays high until the next Start or Reset. A Start while a run is in
// progress is ignored. f_reset (the fabric's Reset) returns it to idle.
//
// The original study names the Reset, Start, Stop, AddressStop and ProgramAddress
// signals; reading ProgramAddress as the first atom address, and the timing
// above, are this design's choices.
module sequencer
  import md_pkg::*;
#(
  parameter int unsigned M_DEPTH = 128,
  localparam int unsigned AW     = $clog2(M_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          f_reset,    // Reset
  input  logic          start,      // Start
  input  logic [AW-1:0] prog_addr,  // ProgramAddress: first atom
  input  logic [AW-1:0] addr_stop,  // AddressStop: last atom
  output logic          seq_valid,
  output logic [AW-1:0] seq_addr,
  output logic          stop,       // Stop
  output logic          busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_e;

  state_e        state;
  logic [AW-1:0] addr, last;
  logic [5:0]    drain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      addr  <= '0;
      last  <= '0;
      drain <= '0;
    end else if (f_reset) begin
      state <= S_IDLE;
      addr  <= '0;
      drain <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE:
          if (start) begin
            state <= S_RUN;
            addr  <= prog_addr;
            last  <= addr_stop;
          end
        S_RUN:
          if (addr == last) begin
            state <= S_DRAIN;
            drain <= 6'(CELL_LAT - 1);
          end else begin
            addr <= addr + 1'b1;
          end
        S_DRAIN: begin
          drain <= drain - 1'b1;
          if (drain == 6'd1) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign seq_valid = (state == S_RUN);
  assign seq_addr  = addr;
  assign stop      = (state == S_DONE);
  assign busy      = (state == S_RUN) || (state == S_DRAIN);

  // the drain counter must cover the whole pipeline
  initial assert (CELL_LAT < 64);

endmodule
