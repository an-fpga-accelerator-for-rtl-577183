// sync_fifo_tb: random writes and reads against a queue model; checks the
// head data, full, empty and count after every cycle, and that it fills
// and empties completely. The writer never pushes into a full FIFO.
module sync_fifo_tb;
  localparam int WIDTH = 8, DEPTH = 8;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  logic [WIDTH-1:0] q[$];

  always #5 clk = ~clk;
  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int bias;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      bias  = (it / 500) % 2 ? 3 : 7;       // phases that fill and drain
      wr_en = (($urandom % 10) < bias) && !full;
      rd_en = (($urandom % 10) < 10 - bias);
      wr_data = 8'($urandom);
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
      check(int'(count) == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) check(rd_data == q[0], $sformatf("head %02x vs %02x", rd_data, q[0]));
      nfull += full; nempty += empty;
    end
    wr_en = 0; rd_en = 0;
    // clear empties it
    clear = 1; @(negedge clk); clear = 0;
    check(empty && count == 0, "clear");
    check(nfull > 0 && nempty > 0, "never full or never empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
