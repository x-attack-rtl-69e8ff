// tb_sync_fifo: random writes and reads on an 8-deep, 16-bit FIFO checked
// against a queue model: data order, full, empty and count, including
// simultaneous write and read, filling to full and draining to empty.
module tb_sync_fifo;
  localparam int D = 8;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [3:0] count;
  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  logic [15:0] q [$];

  sync_fifo #(.WIDTH(16), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 2000; i++) begin
      int bias;
      bias = (i / 200) % 2 ? 30 : 70;    // alternate filling and draining
      @(negedge clk);
      check(count == 4'(q.size()), "count");
      check(full == (q.size() == D) && empty == (q.size() == 0), "flags");
      if (full) nfull++;
      if (empty) nempty++;
      if (!empty) check(rd_data == q[0], $sformatf("data %h exp %h", rd_data, q[0]));
      wr_en = !full && ($urandom % 100 < bias);
      rd_en = !empty && ($urandom % 100 < 100 - bias);
      wr_data = 16'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    check(nfull > 0 && nempty > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
