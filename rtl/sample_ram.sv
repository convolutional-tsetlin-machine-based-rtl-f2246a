// sample_ram: on-chip RAM holding one dataset, one sample per word
// ({label, 16-bit image}).
//
// Simple dual-port RAM: a write port for the host to load the dataset and a
// read port for the accelerator with a registered output (data one clock
// after the address). The accelerator has one instance for the training set
// (2500 samples) and one for the test set (8192 samples). The source fills
// these RAMs through the FPGA bitstream; a host write port is this design's
// choice. Contents are not reset.
module sample_ram #(
  parameter int DEPTH = 8192,
  parameter int W     = 17
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
