// buffer_fifo_tb: random pushes and pops against a queue model; checks data
// order, the fill count and the full and empty flags, including writes to a
// full and reads from an empty buffer.
module buffer_fifo_tb;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [7:0] model[$];
  int unsigned checks = 0, failures = 0, saw_full = 0, saw_empty_rd = 0;

  always #5 clk = ~clk;
  buffer_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int unsigned bias;
      bias = ((i / 300) % 2 == 0) ? 70 : 30;   // alternate filling and draining
      @(negedge clk);
      check(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() != 0) check(rd_data == model[0], $sformatf("head %02h model %02h", rd_data, model[0]));
      wr_en   = ($urandom_range(0, 99) < bias);
      rd_en   = ($urandom_range(0, 99) < 100 - bias);
      wr_data = 8'($urandom);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update on the same edge as the design
  always @(posedge clk) if (rst_n) begin
    bit did_rd, did_wr;
    did_rd = rd_en && model.size() != 0;
    did_wr = wr_en && model.size() != DEPTH;
    if (wr_en && model.size() == DEPTH) saw_full++;
    if (rd_en && model.size() == 0) saw_empty_rd++;
    if (did_rd) void'(model.pop_front());
    if (did_wr) model.push_back(wr_data);
  end

  final begin
    if (saw_full == 0 || saw_empty_rd == 0) $display("note: full %0d empty-read %0d", saw_full, saw_empty_rd);
  end
endmodule
