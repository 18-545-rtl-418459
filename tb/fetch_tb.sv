// fetch_tb: runs the fetch unit over a program image held in the testbench (with and
// without argument words), with random stalls, and checks the sequence of PCs
// presented, that a stall holds the PC, and that the end-of-program word stops it.
module fetch_tb;
  import gl_pkg::*;
  logic clk = 0, rst = 1, start = 0, stall = 0;
  logic [31:0] instr_in, pc;
  instr_t instr;
  logic valid, running, done;
  logic [31:0] prog [128];
  int expected_pcs [$];
  int checks = 0, failures = 0, stalls = 0, n;

  fetch dut (.*);

  always #5 clk = ~clk;
  assign instr_in = prog[pc[6:0]];

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build a program: instructions with 0..16 argument words (type set) or an
    // immediate in the data field (type clear)
    n = 0;
    for (int i = 0; i < 128; i++) prog[i] = 32'h1234_5678;
    while (n < 110) begin
      int k;
      k = (expected_pcs.size() % 4 == 0) ? 16 : $urandom % 4;
      expected_pcs.push_back(n);
      if ($urandom % 3 == 0) prog[n] = {1'b0, 23'($urandom), 8'h10};
      else begin
        prog[n] = {1'b1, 23'(k), 8'h11};
        n += k;
      end
      n++;
    end
    prog[n] = 0;
    expected_pcs.push_back(n);
    repeat (2) @(negedge clk);
    rst = 0;
    chk(!running, "idle after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    foreach (expected_pcs[i]) begin
      chk(pc == expected_pcs[i], $sformatf("pc %0d expected %0d", pc, expected_pcs[i]));
      if (i == expected_pcs.size() - 1) break;
      chk(valid && running, "valid");
      stall = (i % 2 == 1);
      while (stall) begin
        stalls++;
        @(negedge clk);
        chk(pc == expected_pcs[i], "pc held during stall");
        stall = ($urandom % 2 == 0);
      end
      @(negedge clk);
    end
    chk(!valid, "end word not valid");
    @(negedge clk);
    chk(done && !running, "stopped at end of program");
    chk(stalls > 0, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
