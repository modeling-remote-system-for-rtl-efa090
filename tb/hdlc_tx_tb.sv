// hdlc_tx_tb: feeds compressor words (some of them 0xFFFF to force zero
// insertion) into the framer and records the serial line. Frames are
// rebuilt here from the words: address 01, control 03, eight information
// bytes, the X.25 CRC-16 (checked first against its published value for
// "123456789", 0x906E), all LSB first, with a zero after every five ones
// and the flag 01111110 at both ends. The line must carry exactly these
// frames, separated by whole groups of eight ones (at least one group).
module hdlc_tx_tb;
  import sensor_link_pkg::*;
  localparam int unsigned INFO = 8, NFRAMES = 24, TICK = 3;
  logic clk = 0, rst_n = 0, bit_tick = 0;
  logic word_valid = 0, word_ready, tx_bit, tx_strobe, in_frame;
  rle_word_t word;
  logic [15:0] frame_cnt, stuff_cnt, underrun_cnt;
  bit line[$];
  bit expf[$];   // expected frame bits, flags included, frames back to back
  int unsigned frame_len[$];
  int unsigned checks = 0, failures = 0, exp_stuffed = 0;

  always #5 clk = ~clk;
  hdlc_tx #(.INFO_BYTES(INFO), .FIFO_DEPTH(32), .ADDRESS(8'h01), .CONTROL(8'h03)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] x25(input logic [7:0] d[$]);
    logic [15:0] r;
    r = 16'hFFFF;
    foreach (d[i]) begin
      r ^= {8'h00, d[i]};
      for (int k = 0; k < 8; k++) r = r[0] ? ((r >> 1) ^ 16'h8408) : (r >> 1);
    end
    return ~r;
  endfunction

  function automatic void add_frame(input logic [7:0] content[$]);
    logic [15:0] f;
    bit raw[$];
    int ones, n0;
    f = x25(content);
    content.push_back(f[7:0]);
    content.push_back(f[15:8]);
    foreach (content[i]) for (int k = 0; k < 8; k++) raw.push_back(content[i][k]);
    n0 = expf.size();
    for (int k = 0; k < 8; k++) expf.push_back(HDLC_FLAG[k]);
    ones = 0;
    foreach (raw[i]) begin
      expf.push_back(raw[i]);
      ones = raw[i] ? ones + 1 : 0;
      if (ones == 5) begin expf.push_back(1'b0); ones = 0; exp_stuffed++; end
    end
    for (int k = 0; k < 8; k++) expf.push_back(HDLC_FLAG[k]);
    frame_len.push_back(expf.size() - n0);
  endfunction

  always @(posedge clk) if (rst_n && tx_strobe) line.push_back(tx_bit);

  initial begin
    int cnt = 0;
    forever begin
      @(negedge clk);
      cnt = (cnt + 1) % TICK;
      bit_tick = (cnt == 0);
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] tv[$] = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    logic [7:0] content[$];
    int pos, gap;
    check(x25(tv) == 16'h906E, "reference CRC matches X.25 check value");
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < NFRAMES; fr++) begin
      content = '{8'h01, 8'h03};
      for (int w = 0; w < INFO / 2; w++) begin
        rle_word_t wd;
        wd = ((fr + w) % 5 == 0) ? 16'hFFFF : 16'($urandom);
        content.push_back(wd.count);
        content.push_back(wd.symbol);
        @(negedge clk);
        word_valid = 1; word = wd;
        do @(posedge clk); while (!word_ready);
        #1 word_valid = 0;
        repeat ($urandom_range(0, 40)) @(negedge clk);
      end
      add_frame(content);
    end
    wait (frame_cnt == NFRAMES);
    repeat (40 * TICK) @(posedge clk);
    // walk the line: ones, frame, ones, frame, ...
    pos = 0;
    foreach (frame_len[f]) begin
      int base;
      gap = 0;
      while (pos < line.size() && line[pos] == 1'b1) begin pos++; gap++; end
      check(gap >= 8 && gap % 8 == 0, $sformatf("frame %0d preceded by %0d ones", f, gap));
      base = 0;
      for (int j = 0; j < f; j++) base += frame_len[j];
      for (int b = 0; b < frame_len[f]; b++) begin
        if (pos + b >= line.size() || line[pos + b] != expf[base + b]) begin
          check(0, $sformatf("frame %0d differs at bit %0d", f, b));
          break;
        end
      end
      checks++;
      pos += frame_len[f];
    end
    while (pos < line.size()) begin check(line[pos] == 1'b1, "idle ones after the last frame"); pos++; end
    check(frame_cnt == NFRAMES, "frame count");
    check(stuff_cnt == exp_stuffed && exp_stuffed > 10, $sformatf("stuffed %0d expected %0d", stuff_cnt, exp_stuffed));
    check(underrun_cnt == 0, "no underrun");
    check(!in_frame, "line idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
