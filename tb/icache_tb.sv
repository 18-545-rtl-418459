// icache_tb: fills the instruction cache through the BRAM port (with partial byte
// writes), then checks the registered BRAM read-back and the five combinational
// read ports, including wrap-around at the top address, against a model array.
module icache_tb;
  localparam int DEPTH = 512;
  logic        clk = 0;
  logic        BRAM_rst;
  logic [3:0]  BRAM_wen;
  logic [31:0] BRAM_addr, BRAM_din, BRAM_dout, addr1, addr2;
  logic [31:0] read0, read1, read2, read3, read4;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  icache #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    BRAM_rst = 1; BRAM_wen = 0; BRAM_addr = 0; BRAM_din = 0; addr1 = 0; addr2 = 0;
    @(negedge clk);
    chk(BRAM_dout, 0, "dout after reset");
    BRAM_rst = 0;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom;
      BRAM_wen = 4'hf; BRAM_addr = i * 4; BRAM_din = model[i];
      @(negedge clk);
    end
    // byte-lane write to word 7: only lanes 1 and 3
    BRAM_wen = 4'b1010; BRAM_addr = 7 * 4; BRAM_din = 32'hAABBCCDD;
    model[7] = {8'hAA, model[7][23:16], 8'hCC, model[7][7:0]};
    @(negedge clk);
    BRAM_wen = 0;
    for (int i = 0; i < DEPTH; i += 37) begin
      BRAM_addr = i * 4;
      @(negedge clk);
      chk(BRAM_dout, model[i], "BRAM_dout");
    end
    BRAM_addr = 7 * 4; @(negedge clk); chk(BRAM_dout, model[7], "byte lanes");
    for (int t = 0; t < 300; t++) begin
      addr1 = $urandom % DEPTH; addr2 = (t == 0) ? DEPTH - 2 : $urandom % DEPTH;
      #1;
      chk(read0, model[addr1], "read0");
      chk(read1, model[addr2 % DEPTH], "read1");
      chk(read2, model[(addr2 + 1) % DEPTH], "read2");
      chk(read3, model[(addr2 + 2) % DEPTH], "read3");
      chk(read4, model[(addr2 + 3) % DEPTH], "read4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
