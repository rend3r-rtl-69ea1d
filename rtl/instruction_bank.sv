// instruction_bank: buffer of 32-bit graphics instructions between the
// network side and the instruction processor.
//
// A simple dual-port memory: the network side writes one word per cycle on
// its own clock (wr_clk), and the instruction processor reads on the system
// clock with one cycle of read latency (rd_addr presented in cycle n, rd_data
// valid in cycle n+1), as a block RAM would. The memory can also be loaded at
// start-up from a hex file named by INIT_FILE. The two-port, two-clock
// organisation and the depth are this design's choices; the buffering role
// and the preset program file follow the published system description.
module instruction_bank #(
  parameter int    DEPTH     = 4096,
  parameter string INIT_FILE = "",
  localparam int   AW        = $clog2(DEPTH)
) (
  input  logic          wr_clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  input  logic          rd_clk,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data
);
  logic [31:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge rd_clk) begin
    rd_data <= mem[rd_addr];
  end
endmodule
