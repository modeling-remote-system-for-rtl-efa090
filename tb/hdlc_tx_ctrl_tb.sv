// hdlc_tx_ctrl_tb: the controller with a 32-byte buffer_fifo, a serializer
// model that takes a byte every few cycles and a flag generator model that
// reports frame_done some time after the last byte. Checks the byte
// sequence of every frame (01, 03, then eight bytes from four words, count
// byte first), the last tag on the eighth information byte only, that no
// frame starts before the previous frame_done, and that words are refused
// while the FIFO lacks room for two bytes.
module hdlc_tx_ctrl_tb;
  import sensor_link_pkg::*;
  localparam int unsigned INFO = 8, DEPTH = 32;
  logic clk = 0, rst_n = 0, word_valid = 0, word_ready;
  rle_word_t word = '0;
  logic fifo_wr_en, fifo_rd_en, fifo_full, fifo_empty;
  logic [7:0] fifo_wr_data, fifo_rd_data;
  logic [$clog2(DEPTH+1)-1:0] fifo_count;
  logic byte_valid, byte_ready = 0, byte_last, frame_done = 0;
  logic [7:0] byte_data;
  logic [15:0] frame_cnt;
  logic [7:0] info_q[$];
  int unsigned checks = 0, failures = 0, pos = 0, frames_seen = 0, refused = 0;
  bit waiting_done = 0, lo_pend_m = 0;

  always #5 clk = ~clk;
  hdlc_tx_ctrl #(.INFO_BYTES(INFO), .FIFO_DEPTH(DEPTH), .ADDRESS(8'h01), .CONTROL(8'h03)) dut (.*);
  buffer_fifo #(.WIDTH(8), .DEPTH(DEPTH)) fifo (
    .clk, .rst_n, .wr_en(fifo_wr_en), .wr_data(fifo_wr_data), .full(fifo_full),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .empty(fifo_empty), .count(fifo_count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // serializer and flag generator models
  always @(posedge clk) if (rst_n) begin
    if (word_valid && !word_ready) begin
      refused++;
      check(fifo_count > DEPTH - 2 || lo_pend_m, "word refused only when the FIFO is short of room");
    end
    if (byte_valid && byte_ready) begin
      logic [7:0] e;
      check(!waiting_done, "no byte before frame_done");
      e = (pos == 0) ? 8'h01 : (pos == 1) ? 8'h03 : info_q.pop_front();
      check(byte_data == e, $sformatf("frame %0d byte %0d: %02h expected %02h", frames_seen, pos, byte_data, e));
      check(byte_last == (pos == INFO + 1), "last tag");
      pos++;
      if (pos == INFO + 2) begin
        pos = 0;
        frames_seen++;
        waiting_done = 1;
        fork begin
          repeat ($urandom_range(5, 60)) @(posedge clk);
          frame_done <= 1;
          @(posedge clk);
          frame_done <= 0;
          waiting_done = 0;
        end join_none
      end
    end
    byte_ready <= ($urandom_range(0, 4) == 0);
    lo_pend_m = word_valid && word_ready;   // second byte of an accepted word is written next
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      rle_word_t wd;
      wd = 16'($urandom);
      info_q.push_back(wd.count);
      info_q.push_back(wd.symbol);
      @(negedge clk);
      word_valid = 1; word = wd;
      do @(posedge clk); while (!word_ready);
      #1 word_valid = 0;
    end
    wait (frame_cnt == 50);
    repeat (10) @(posedge clk);
    check(frames_seen == 50 && info_q.size() == 0, $sformatf("%0d frames, %0d bytes left", frames_seen, info_q.size()));
    check(refused > 0, "FIFO back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
