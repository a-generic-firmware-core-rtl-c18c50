// tb_fpga_elink: self-checking test of the HDLC e-port.
//
// A reference HDLC encoder written here (byte-wise CRC-16/X.25, LSB-first
// bits, zero insertion after five 1s) builds the expected line bits. The test
// checks: the reference CRC against the published X.25 check value of
// "123456789" (0x906E); the transmitted bit stream of an I-frame (sequence
// numbers 0/0) and, after a frame has been received, of a second I-frame
// whose N(R) has moved to 1; a U-frame (connect); reception of a good
// I-frame and U-frame; rejection of a frame with a corrupted bit; and the
// sustained rate of back-to-back frames (one frame per line time at 2 bits
// per clock, the e-link's 80 Mb/s at 40 MHz).
module tb_fpga_elink;
  import sca_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tx_valid = 0, tx_ready, ucmd_valid = 0, ucmd_ready;
  sca_payload_t tx_payload = '0;
  logic [7:0] ucmd = '0;
  logic [1:0] elink_tx, elink_rx;
  logic rx_valid, rx_u_valid, rx_err;
  sca_payload_t rx_payload;
  logic [7:0] rx_u_ctrl;

  fpga_elink dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------- reference encoder
  function automatic logic [15:0] ref_crc(input byte unsigned b[$]);
    logic [15:0] c = 16'hFFFF;
    foreach (b[i]) begin
      c ^= 16'(b[i]);
      repeat (8) c = c[0] ? (c >> 1) ^ 16'h8408 : (c >> 1);
    end
    return c;
  endfunction

  typedef bit bitq_t[$];
  function automatic bitq_t ref_frame(input byte unsigned b[$]);
    bitq_t q;
    int ones = 0;
    logic [15:0] fcs;
    byte unsigned all[$];
    fcs = ~ref_crc(b);
    all = b;
    all.push_back(fcs[7:0]);
    all.push_back(fcs[15:8]);
    for (int i = 0; i < 8; i++) q.push_back(HDLC_FLAG[i]);
    foreach (all[i]) for (int j = 0; j < 8; j++) begin
      q.push_back(all[i][j]);
      ones = all[i][j] ? ones + 1 : 0;
      if (ones == 5) begin q.push_back(1'b0); ones = 0; end
    end
    for (int i = 0; i < 8; i++) q.push_back(HDLC_FLAG[i]);
    return q;
  endfunction


  typedef byte unsigned byteq_t[$];
  function automatic byteq_t i_bytes(input sca_payload_t p, input logic [7:0] ctrl);
    byteq_t b;
    b = '{8'h00, ctrl, p.tr, p.ch, p.cmd, p.len,
          p.data[31:24], p.data[23:16], p.data[15:8], p.data[7:0]};
    return b;
  endfunction

  // ------------------------------------------------------- line capture
  bit txq[$];
  always @(negedge clk) if (rst_n) begin
    txq.push_back(elink_tx[1]);
    txq.push_back(elink_tx[0]);
  end

  // The opening flag of a transmitted frame can start before the capture
  // does, so the search skips it and matches the rest up to the closing flag.
  function automatic bit contains(input bit hay[$], input bit full_pat[$]);
    bit pat[$];
    pat = full_pat[8:$];
    for (int i = 0; i + pat.size() <= hay.size(); i++) begin
      bit m = 1;
      for (int j = 0; j < pat.size() && m; j++) if (hay[i + j] != pat[j]) m = 0;
      if (m) return 1;
    end
    return 0;
  endfunction

  // ------------------------------------------------------- line driver
  bit rxq[$];
  always @(posedge clk) begin
    bit a, b;
    a = (rxq.size() > 0) ? rxq.pop_front() : 1'b1;
    b = (rxq.size() > 0) ? rxq.pop_front() : 1'b1;
    elink_rx <= {a, b};
  end

  int n_rx = 0, n_u = 0, n_err = 0;
  sca_payload_t last_rx;
  always @(negedge clk) begin
    if (rx_valid) begin n_rx++; last_rx = rx_payload; end
    if (rx_u_valid) n_u++;
    if (rx_err) n_err++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sca_payload_t p1, p2;
    bitq_t exp;
    byte unsigned s[$];
    int t0, t1, sz, min_sz, max_sz;
    int ta[6];
    sca_payload_t pk[6];
    s = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    check(~ref_crc(s) == 16'h906E, "reference CRC check value");

    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    // 1: transmit an I-frame with many 1s (forces bit stuffing)
    p1 = '{tr: 8'h7E, ch: 8'h05, cmd: 8'hDA, len: 8'h04, data: 32'hFFFF_F0A5};
    txq.delete();
    @(negedge clk); tx_payload = p1; tx_valid = 1;
    while (!tx_ready) @(negedge clk);
    @(negedge clk); tx_valid = 0;
    repeat (120) @(posedge clk);
    exp = ref_frame(i_bytes(p1, 8'h00));
    check(contains(txq, exp), "I-frame bits on the line");
    check(exp.size() / 2 >= 52, "frame takes at least 52 cycles");

    // 2: receive a good I-frame (N(S)=0), then a corrupted one
    p2 = '{tr: 8'h11, ch: 8'h14, cmd: 8'h00, len: 8'h04, data: 32'h1234_5678};
    rxq = ref_frame(i_bytes(p2, 8'h00));
    repeat (80) @(posedge clk);
    check(n_rx == 1, "one I-frame received");
    check(last_rx == p2, "received payload");
    exp = ref_frame(i_bytes(p2, 8'h00));
    exp[40] = !exp[40];
    rxq = exp;
    repeat (80) @(posedge clk);
    check(n_rx == 1 && n_err == 1, "corrupted frame rejected");

    // 3: second transmitted frame carries N(S)=1, N(R)=1
    txq.delete();
    @(negedge clk); tx_payload = p2; tx_valid = 1;
    while (!tx_ready) @(negedge clk);
    @(negedge clk); tx_valid = 0;
    repeat (120) @(posedge clk);
    check(contains(txq, ref_frame(i_bytes(p2, 8'h22))), "sequence numbers in 2nd frame");

    // 4: U-frames
    txq.delete();
    @(negedge clk); ucmd = HDLC_CONNECT; ucmd_valid = 1;
    while (!ucmd_ready) @(negedge clk);
    @(negedge clk); ucmd_valid = 0;
    repeat (60) @(posedge clk);
    check(contains(txq, ref_frame('{8'h00, HDLC_CONNECT})), "connect U-frame on the line");
    rxq = ref_frame('{8'h00, HDLC_UA});
    repeat (40) @(posedge clk);
    check(n_u == 1 && rx_u_ctrl == HDLC_UA, "UA U-frame received");

    // 5: sustained rate. Frames offered back to back must be taken once per
    // frame time on the line, 2 bits per clock (80 Mb/s at 40 MHz). The
    // first accepts can come early (the frame register is empty), so the
    // gaps are measured from the third accept on.
    for (int k = 0; k < 6; k++) begin
      pk[k] = '{tr: 8'(k), ch: 8'h03, cmd: 8'h40, len: 8'h04, data: 32'(k * 32'h0101_0101)};
      sz = ref_frame(i_bytes(pk[k], 8'h00)).size();
      if (k == 0 || sz < min_sz) min_sz = sz;
      if (k == 0 || sz > max_sz) max_sz = sz;
    end
    @(negedge clk); tx_payload = pk[0]; tx_valid = 1;
    for (int k = 0; k < 6; k++) begin
      while (!tx_ready) @(negedge clk);
      ta[k] = int'($time / 10);
      @(negedge clk);
      if (k < 5) tx_payload = pk[k + 1]; else tx_valid = 0;
    end
    for (int k = 3; k < 6; k++) begin
      t1 = ta[k] - ta[k - 1];
      check(2 * t1 >= min_sz - 8 && 2 * t1 <= max_sz + 2,
            $sformatf("frame period %0d cycles for %0d..%0d line bits", t1, min_sz, max_sz));
    end
    t0 = ta[5] - ta[2];
    $display("periods %0d %0d %0d", ta[3]-ta[2], ta[4]-ta[3], ta[5]-ta[4]);
    check(t0 >= 3 * 52 && t0 <= 3 * 58, $sformatf("3 frames in %0d cycles (>= 156 at 2 bits/clock)", t0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
