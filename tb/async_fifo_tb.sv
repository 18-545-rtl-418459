// async_fifo_tb: writer and reader on unrelated clocks (7 ns and 11 ns, then the
// reader sped up to 3 ns) with random enables; every word read must be the next one
// written, in order, with none lost. Also checks that the FIFO reports full when
// the reader is held off, that no write is accepted while full, and that it drains
// to empty.
module async_fifo_tb;
  localparam int WIDTH = 96, DEPTH = 16;
  logic wr_clk = 0, rd_clk = 0, wr_rst = 1, rd_rst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] sent [$];
  int checks = 0, failures = 0, nsent = 0, nrecv = 0, full_seen = 0;
  int rd_half = 11;
  bit hold_reader = 0;

  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #7 wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(posedge wr_clk) begin
    if (!wr_rst) begin
      if (wr_en && !full) begin
        sent.push_back(wr_data);
        nsent++;
      end
      if (full) full_seen++;
      wr_en   <= (nsent < 2000) && ($urandom % 3 != 0);
      wr_data <= {$urandom, $urandom, $urandom};
    end
  end

  // reader
  always @(posedge rd_clk) begin
    if (!rd_rst) begin
      if (rd_en && !empty) begin
        chk(sent.size() > 0 && rd_data == sent[0], $sformatf("word %0d", nrecv));
        if (sent.size() > 0) void'(sent.pop_front());
        nrecv++;
      end
      rd_en <= !hold_reader && ($urandom % 2 == 0);
    end
  end

  initial begin
    repeat (3) @(posedge rd_clk);
    wr_rst = 0; rd_rst = 0;
    hold_reader = 1;
    repeat (60) @(posedge wr_clk);
    chk(full, "full while reader held");
    chk(nsent == DEPTH, $sformatf("accepted %0d words while held", nsent));
    hold_reader = 0;
    wait (nsent >= 1000);
    rd_half = 3;
    wait (nsent >= 2000);
    repeat (100) @(posedge rd_clk);
    chk(empty, "drained");
    chk(nrecv == 2000, $sformatf("received %0d", nrecv));
    chk(full_seen > 0, "full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
