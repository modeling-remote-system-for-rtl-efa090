// hdlc_flag_gen_tb: a source offers frames of random bits (already
// stuffed, last bit tagged), sometimes late. The line, one bit per
// bit_tick (every 3 cycles), must read: whole groups of eight ones, at
// least one, then 01111110, the frame bits, 01111110, and so on, with one
// frame_done per frame. Finally the source stops in the middle of a frame
// for three bit times: underrun_cnt must count exactly 3.
module hdlc_flag_gen_tb;
  import sensor_link_pkg::*;
  localparam int unsigned TICK = 3, NF = 40;
  logic clk = 0, rst_n = 0, bit_tick = 0, in_valid = 0, in_ready;
  hdlc_bit_t in_bit = '0;
  logic tx_bit, tx_strobe, in_frame, frame_done;
  logic [15:0] underrun_cnt;
  bit line[$];
  bit frames[NF][$];
  int unsigned checks = 0, failures = 0, dones = 0;

  always #5 clk = ~clk;
  hdlc_flag_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (tx_strobe) line.push_back(tx_bit);
    if (frame_done) dones++;
  end

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
    int pos, gap;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      int len;
      len = $urandom_range(1, 30);
      for (int i = 0; i < len; i++) frames[f].push_back(1'($urandom));
      repeat ($urandom_range(0, 40)) @(negedge clk);
      foreach (frames[f][i]) begin
        @(negedge clk);
        in_valid = 1; in_bit = '{bit_val: frames[f][i], last: i == len - 1};
        do @(posedge clk); while (!in_ready);
        #1 in_valid = 0;
      end
    end
    repeat (30 * TICK) @(posedge clk);
    check(dones == NF, $sformatf("%0d frame_done pulses", dones));
    check(!in_frame, "idle after the frames");
    pos = 0;
    for (int f = 0; f < NF; f++) begin
      bit ok;
      gap = 0;
      while (pos < line.size() && line[pos]) begin pos++; gap++; end
      check(gap >= 8 && gap % 8 == 0, $sformatf("frame %0d after %0d ones", f, gap));
      ok = 1;
      for (int k = 0; k < 8; k++) if (line[pos + k] != HDLC_FLAG[k]) ok = 0;
      pos += 8;
      foreach (frames[f][i]) if (line[pos + i] != frames[f][i]) ok = 0;
      pos += frames[f].size();
      for (int k = 0; k < 8; k++) if (line[pos + k] != HDLC_FLAG[k]) ok = 0;
      pos += 8;
      check(ok, $sformatf("frame %0d: flags and bits", f));
    end
    // underrun
    check(underrun_cnt == 0, "no underrun so far");
    for (int i = 0; i < 20; i++) begin
      if (i == 10) begin
        while (underrun_cnt != 3) @(negedge clk);
      end
      @(negedge clk);
      in_valid = 1; in_bit = '{bit_val: 1'b0, last: i == 19};
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 0;
    end
    repeat (30 * TICK) @(posedge clk);
    check(underrun_cnt == 3, $sformatf("underrun count %0d", underrun_cnt));
    check(dones == NF + 1, "frame with underrun closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
