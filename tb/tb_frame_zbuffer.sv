// tb_frame_zbuffer: the clear engine fills +infinity in one cycle per entry;
// writes and one-cycle-latency reads then return what was written.
module tb_frame_zbuffer;
  localparam int W = 16, H = 8, N = W * H;
  logic clk = 0, rst = 1, clear_start = 0, we = 0;
  logic clear_busy;
  logic [6:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frame_zbuffer #(.SCREEN_W(W), .SCREEN_H(H)) dut (.*);

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    clear_start = 1;
    @(negedge clk);
    clear_start = 0;
    cyc = 0;
    while (clear_busy) begin
      @(negedge clk);
      cyc++;
    end
    chk($sformatf("clear takes %0d cycles", cyc), cyc == N);
    for (int i = 0; i < N; i++) model[i] = 16'h7C00;
    for (int i = 0; i < N; i += 3) begin
      @(negedge clk);
      we = 1;
      waddr = 7'(i);
      wdata = 16'($urandom);
      model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      raddr = 7'(i);
      @(posedge clk);
      #1;
      chk($sformatf("entry %0d got %h expected %h", i, rdata, model[i]), rdata == model[i]);
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
