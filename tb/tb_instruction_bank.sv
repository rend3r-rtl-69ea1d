// tb_instruction_bank: writes random words on the network clock, reads them
// back on the system clock and checks the one-cycle read latency.
module tb_instruction_bank;
  localparam int DEPTH = 64;
  logic wr_clk = 0, rd_clk = 0, wr_en = 0;
  logic [5:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #10 wr_clk = ~wr_clk;
  always #5 rd_clk = ~rd_clk;

  instruction_bank #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wr_clk);
      wr_en = 1;
      wr_addr = 6'(i);
      wr_data = $urandom;
      model[i] = wr_data;
    end
    @(negedge wr_clk);
    wr_en = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge rd_clk);
      rd_addr = 6'($urandom);
      @(posedge rd_clk);
      #1;
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++;
        $display("FAIL addr %0d got %h expected %h", rd_addr, rd_data, model[rd_addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
