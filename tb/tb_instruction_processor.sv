// tb_instruction_processor: runs a program from a behavioural instruction
// memory and checks every write to the scene store (camera, light, and the
// SE/SD shape pair, including an SD word that looks like an F-type
// instruction), the compute-mode stall on nf and nr until the controller
// answers, the loop to address 0 on lr, and the permanent stop on er.
module tb_instruction_processor;
  import tb_fp_util_pkg::*;
  logic clk = 0, rst = 1, run = 0;
  logic [5:0] ib_addr;
  logic [31:0] ib_data;
  logic bank_clear, cam_we, lt_we, sh_we, ctrl_render, ctrl_clear, ctrl_done = 0;
  logic [4:0] cam_prop, lt_prop, sh_prop, sh_prop2;
  logic [15:0] cam_data, lt_data, sh_data, sh_data2;
  logic [5:0] lt_idx;
  logic [18:0] sh_idx;
  logic compute_mode, halted;
  logic [31:0] imem [64];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) ib_data <= imem[ib_addr];

  instruction_processor #(.IADDR_W(6)) dut (.*);

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // observed events, in order
  string ev [$];
  int n_render = 0, n_clear = 0, stall_cycles = 0;
  always @(posedge clk) begin
    if (cam_we) ev.push_back($sformatf("cam %0d %h", cam_prop, cam_data));
    if (lt_we) ev.push_back($sformatf("lt %0d %0d %h", lt_idx, lt_prop, lt_data));
    if (sh_we) ev.push_back($sformatf("sh %0d %0d %h %0d %h", sh_idx, sh_prop, sh_data, sh_prop2, sh_data2));
    if (bank_clear) ev.push_back("clear");
    if (ctrl_render) n_render++;
    if (ctrl_clear) n_clear++;
    if (compute_mode) stall_cycles++;
  end

  // controller model: answers each request after 20 cycles
  initial begin
    forever begin
      @(posedge clk);
      if (ctrl_render || ctrl_clear) begin
        repeat (20) @(posedge clk);
        @(negedge clk);
        ctrl_done = 1;
        @(negedge clk);
        ctrl_done = 0;
      end
    end
  end

  initial begin
    string exp_ev [$];
    for (int i = 0; i < 64; i++) imem[i] = asm_f(2'b00);
    imem[0] = asm_f(2'b01);                       // nr
    imem[1] = asm_cam(3, 16'h4600);
    imem[2] = asm_lt(37, 7, 16'hABCD);
    imem[3] = asm_se(300001, 4, 13);
    imem[4] = asm_f(2'b11);                       // SD word equal to an lr encoding
    imem[5] = 32'h0000_0007;                      // unknown opcode: skipped
    imem[6] = asm_f(2'b10);                       // nf
    imem[7] = asm_f(2'b11);                       // lr
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    chk("waits for run", ib_addr == 0 && ev.size() == 0);
    run = 1;
    // first pass, then after lr the program is changed to end at word 7
    wait (n_clear == 2);
    imem[7] = asm_f(2'b00);
    wait (halted);
    repeat (10) @(posedge clk);
    exp_ev = '{"clear", "cam 3 4600", "lt 37 7 abcd",
               $sformatf("sh %0d 4 %h 13 %h", 300001, 16'h0000, 16'h0601),
               "clear", "cam 3 4600", "lt 37 7 abcd",
               $sformatf("sh %0d 4 %h 13 %h", 300001, 16'h0000, 16'h0601)};
    chk($sformatf("event count %0d", ev.size()), ev.size() == exp_ev.size());
    foreach (exp_ev[i]) if (i < ev.size())
      chk($sformatf("event %0d: '%s' expected '%s'", i, ev[i], exp_ev[i]), ev[i] == exp_ev[i]);
    chk($sformatf("renders %0d clears %0d", n_render, n_clear), n_render == 2 && n_clear == 2);
    chk($sformatf("stalled %0d cycles in compute mode", stall_cycles), stall_cycles >= 4 * 20);
    chk("halted stays at the er word", halted && ib_addr == 7);
    repeat (20) @(posedge clk);
    chk("no further activity after er", ev.size() == exp_ev.size());
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
