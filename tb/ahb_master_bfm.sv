// ahb_master_bfm: AHB-Lite master bus model for testbenches. It stands in for
// the stripe-to-PLD bridge driving the accelerator's slave port. Tasks:
// write / read for single NONSEQ word transfers (address phase, then data
// phase), and write_read for a write whose data phase overlaps the address
// phase of a read, as a pipelined AHB master issues them. With one slave on
// the bus, hready is the slave's hreadyout; the stall input adds cycles in
// which hready is low, as another slave's wait states would; they never fall
// in a data phase of the accelerator, which alone drives hready then.
module ahb_master_bfm (
  input  logic        clk,
  output logic        hsel,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [31:0] hwdata,
  output logic        hready,
  input  logic        hreadyout,
  input  logic [31:0] hrdata,
  input  logic        stall
);
  localparam logic [1:0] IDLE = 2'b00, NONSEQ = 2'b10;

  // foreign wait states only fall outside this slave's data phases
  logic in_data = 1'b0;
  assign hready = hreadyout && !(stall && !in_data);

  initial begin
    hsel = 0; haddr = 0; htrans = IDLE; hwrite = 0; hsize = 3'b010; hwdata = 0;
  end

  task automatic addr_phase(input logic [31:0] a, input logic w);
    hsel = 1; haddr = a; htrans = NONSEQ; hwrite = w; hsize = 3'b010;
  endtask

  task automatic idle();
    hsel = 0; htrans = IDLE; hwrite = 0;
  endtask

  // wait for the clock edge that ends the current phase
  task automatic end_phase();
    do @(posedge clk); while (!hready);
    @(negedge clk);
  endtask

  task automatic write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    addr_phase(a, 1'b1);
    end_phase();
    idle();
    hwdata = d;
    in_data = 1'b1;
    end_phase();
    in_data = 1'b0;
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    addr_phase(a, 1'b0);
    end_phase();
    idle();
    in_data = 1'b1;
    do @(posedge clk); while (!hready);
    d = hrdata;          // sampled on the edge that ends the data phase
    @(negedge clk);
    in_data = 1'b0;
  endtask

  task automatic write_read(input logic [31:0] wa, input logic [31:0] wd,
                            input logic [31:0] ra, output logic [31:0] rd);
    @(negedge clk);
    addr_phase(wa, 1'b1);
    end_phase();
    addr_phase(ra, 1'b0);
    hwdata = wd;
    in_data = 1'b1;
    end_phase();
    idle();
    do @(posedge clk); while (!hready);
    rd = hrdata;
    @(negedge clk);
    in_data = 1'b0;
  endtask
endmodule
