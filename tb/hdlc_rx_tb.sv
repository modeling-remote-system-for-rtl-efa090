// hdlc_rx_tb: builds a line signal here (address, control, information,
// X.25 CRC-16, LSB first, zero insertion, flags, groups of eight idle ones)
// and feeds it to the receiver with random gaps between bits. Among the
// good frames, of random length and often full of ones, it mixes a frame
// with one information bit flipped after the FCS was computed (must count a
// CRC error), one for another address, one aborted by seven ones and one of
// only two bytes (these must be dropped). Only the information bytes of the
// good frames may come out, in order, with a stalling consumer.
module hdlc_rx_tb;
  import sensor_link_pkg::*;
  logic clk = 0, rst_n = 0, rx_bit = 1, rx_valid = 0;
  logic out_valid, out_ready = 1, frame_ok, frame_err;
  logic [7:0] out_data;
  logic [15:0] ok_cnt, crc_err_cnt, drop_cnt, destuff_cnt;
  bit line[$];
  logic [7:0] expq[$];
  int unsigned checks = 0, failures = 0, exp_ok = 0, exp_crc = 0, exp_drop = 0, exp_stuffed = 0;

  always #5 clk = ~clk;
  hdlc_rx #(.ADDRESS(8'h01), .OUT_DEPTH(64)) dut (.*);

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

  function automatic void idle(input int groups);
    for (int i = 0; i < 8 * groups; i++) line.push_back(1'b1);
  endfunction

  // kind: 0 good, 1 bit error, 2 wrong address, 3 abort, 4 short
  function automatic void frame(input int kind, input logic [7:0] info[$]);
    logic [7:0] c[$];
    logic [15:0] f;
    bit raw[$];
    int ones;
    c = '{(kind == 2) ? 8'h02 : 8'h01, 8'h03};
    foreach (info[i]) c.push_back(info[i]);
    if (kind == 4) c = '{8'h01, 8'h03};
    else begin
      f = x25(c);
      c.push_back(f[7:0]);
      c.push_back(f[15:8]);
    end
    if (kind == 1) c[2][3] = ~c[2][3];
    foreach (c[i]) for (int k = 0; k < 8; k++) raw.push_back(c[i][k]);
    for (int k = 0; k < 8; k++) line.push_back(HDLC_FLAG[k]);
    ones = 0;
    foreach (raw[i]) begin
      if (kind == 3 && i == raw.size() / 2) begin
        for (int k = 0; k < 8; k++) line.push_back(1'b1);   // abort
        exp_drop++;
        return;
      end
      line.push_back(raw[i]);
      ones = raw[i] ? ones + 1 : 0;
      if (ones == 5) begin line.push_back(1'b0); ones = 0; exp_stuffed++; end
    end
    for (int k = 0; k < 8; k++) line.push_back(HDLC_FLAG[k]);
    case (kind)
      0: begin exp_ok++; foreach (info[i]) expq.push_back(info[i]); end
      1: exp_crc++;
      default: exp_drop++;
    endcase
  endfunction

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (expq.size() == 0) check(0, "unexpected byte");
    else begin
      logic [7:0] e;
      e = expq.pop_front();
      check(out_data == e, $sformatf("byte %02h expected %02h", out_data, e));
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] info[$];
    int stuffed_before_bad;
    idle(3);
    for (int f = 0; f < 60; f++) begin
      int kind;
      kind = (f % 12 == 5) ? 1 : (f % 12 == 7) ? 2 : (f % 12 == 9) ? 3 : (f % 12 == 11) ? 4 : 0;
      info = {};
      for (int i = 0; i < $urandom_range(0, 24); i++)
        info.push_back(($urandom_range(0, 2) == 0) ? 8'hFF : 8'($urandom));
      if (kind == 1 && info.size() == 0) info.push_back(8'h55);
      if (kind == 3 && info.size() < 4) info = '{8'h10, 8'h20, 8'h30, 8'h40};
      frame(kind, info);
      idle($urandom_range(1, 3));
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      foreach (line[i]) begin
        @(negedge clk);
        rx_bit = line[i]; rx_valid = 1;
        @(negedge clk);
        rx_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      forever begin
        @(negedge clk);
        out_ready = ($urandom_range(0, 2) != 0);
      end
    join_any
    out_ready = 1;
    repeat (200) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d bytes never came", expq.size()));
    check(ok_cnt == exp_ok, $sformatf("ok %0d expected %0d", ok_cnt, exp_ok));
    check(crc_err_cnt == exp_crc && exp_crc > 0, $sformatf("crc errors %0d expected %0d", crc_err_cnt, exp_crc));
    check(drop_cnt == exp_drop && exp_drop > 0, $sformatf("dropped %0d expected %0d", drop_cnt, exp_drop));
    check(destuff_cnt > 20, $sformatf("%0d zeros removed", destuff_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
