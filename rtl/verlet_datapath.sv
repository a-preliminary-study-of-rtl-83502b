// verlet_datapath: the pipelined data-path of one Verlet cell.
//
// For one atom per clock it computes, in IEEE-754 single precision,
//   t       = f * M              (M = 0.5*dt/mass, prepared by the host)
//   vel_new = vel + t
//   pos_new = pos + dt * vel_new
// which is the inner body of the tiled Verlet loop. The graph of two
// multipliers and two adders, the reuse of the new velocity for the position
// update and dt as a multiplier input follow the original study's data-path;
// the delay lines that line vel and pos up with the products, and the
// valid/tag pipe that carries each atom's address to the write-back, are this
// design's way of making the graph run at one atom per cycle.
//
// Timing: inputs sampled with in_valid at edge 0 appear on vel_new/pos_new
// with out_valid and the same tag DP_LAT (= 20) edges later. dt must be held
// steady while atoms are in flight.
module verlet_datapath
  import md_pkg::*;
#(
  parameter int unsigned TAG_W = ATOM_AW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic [FP_W-1:0]  f,
  input  logic [FP_W-1:0]  m,
  input  logic [FP_W-1:0]  vel,
  input  logic [FP_W-1:0]  pos,
  input  logic [FP_W-1:0]  dt,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [FP_W-1:0]  vel_new,
  output logic [FP_W-1:0]  pos_new
);

  logic [FP_W-1:0] fm, vel_d, v1, dtv, pos_d;

  // t = f * M
  fp_mul u_mul_fm (.clk(clk), .a(f), .b(m), .y(fm));

  // vel waits for the product
  delay_line #(.W(FP_W), .DEPTH(MUL_LAT)) u_dly_vel (.clk(clk), .d(vel), .q(vel_d));

  // vel' = vel + t
  fp_add u_add_vel (.clk(clk), .a(vel_d), .b(fm), .y(v1));

  // dt * vel'
  fp_mul u_mul_dt (.clk(clk), .a(dt), .b(v1), .y(dtv));

  // pos waits for dt*vel'
  delay_line #(.W(FP_W), .DEPTH(2 * MUL_LAT + ADD_LAT)) u_dly_pos (.clk(clk), .d(pos), .q(pos_d));

  // pos' = pos + dt*vel'
  fp_add u_add_pos (.clk(clk), .a(pos_d), .b(dtv), .y(pos_new));

  // vel' waits for pos'
  delay_line #(.W(FP_W), .DEPTH(MUL_LAT + ADD_LAT)) u_dly_v1 (.clk(clk), .d(v1), .q(vel_new));

  // tag travels with the data
  delay_line #(.W(TAG_W), .DEPTH(DP_LAT)) u_dly_tag (.clk(clk), .d(in_tag), .q(out_tag));

  // valid pipe, cleared by reset so no spurious write-back follows it
  logic [DP_LAT-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[DP_LAT-2:0], in_valid};
  end
  assign out_valid = vpipe[DP_LAT-1];

endmodule
