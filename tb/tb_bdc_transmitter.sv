// tb_bdc_transmitter: sends random bursts (lengths 1..256, compression on and
// off, image-like and random data) and records every channel beat.  Each burst
// must appear as one control beat, two address beats and exactly the data
// beats of the reference encoder, with the PI on PHASE.  Input gaps and READY
// stalls are random in half of the bursts; in the other half input and READY
// are always on and the burst must occupy the channel for exactly
// 3 + (data beats) cycles, i.e. compression adds no cycle to the transfer.
// Some bursts are read requests (control and address beats only) and some are
// sent as data beats only, as on a slave channel.
module tb_bdc_transmitter;
  import bdc_pkg::*;
  import tb_bdc_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        req_valid, req_ready;
  logic        req_data_only;
  ctrl_word_t  req_ctrl;
  logic [31:0] req_addr;
  logic        in_valid, in_ready;
  logic [31:0] in_data;
  logic        m_valid, m_ready;
  logic [15:0] m_channel;
  logic [2:0]  m_phase;
  logic        busy;
  int checks = 0, failures = 0;
  bit stall_mode;
  int beats_seen[$];   // phase << 16 | channel
  int busy_cycles;
  int cur_it;

  bdc_transmitter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired in burst %0d state %0d busy %b", cur_it, dut.state, busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel monitor and READY driver
  always @(posedge clk) begin
    if (rst_n && m_valid && m_ready) beats_seen.push_back((int'(m_phase) << 16) | int'(m_channel));
    if (rst_n && busy) busy_cycles++;
  end
  always @(negedge clk) m_ready <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("mismatch: %s", what);
    end
  endtask

  initial begin
    byte unsigned d[$];
    beat_t        beats[$];
    req_valid = 0; req_data_only = 0; in_valid = 0; in_data = '0; req_ctrl = '0; req_addr = '0;
    stall_mode = 0; m_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int len, sent, hdr;
      bit cmp, rd_req, data_only;
      rd_req    = (it % 11 == 6);
      data_only = !rd_req && ((it % 11 == 8) || (it % 13 == 2));
      hdr       = data_only ? 0 : 3;
      stall_mode = it[0];
      len = (it % 7 == 0) ? 256 : $urandom_range(1, 256);
      cmp = (it % 5 != 3);
      if (it % 9 == 4) begin
        d.delete();
        repeat (len) d.push_back(8'($urandom));
      end else gen_image(len, $urandom_range(0, 20), d);
      ref_encode(d, cmp, beats);
      if (rd_req) beats.delete();
      beats_seen.delete();
      busy_cycles = 0;
      cur_it = it;
      @(negedge clk);
      req_ctrl        = '0;
      req_ctrl.cmp_en = cmp;
      req_ctrl.traffic = rd_req ? TR_READ : (data_only ? 2'($urandom) : 2'($urandom_range(2, 3)));
      if (it % 4 == 0 && !rd_req) req_ctrl.traffic = TR_WRITE;
      req_data_only = data_only;
      req_ctrl.len_m1 = 8'(len - 1);
      req_addr  = $urandom;
      req_valid = 1;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      @(negedge clk);
      req_valid = 0;
      req_data_only = 0;
      sent = rd_req ? len : 0;
      while (sent < len) begin
        in_valid = stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
        for (int i = 0; i < 4; i++) in_data[i*8 +: 8] = (sent + i < len) ? d[sent + i] : 8'($urandom);
        @(posedge clk);
        if (in_valid && in_ready) sent += 4;
        @(negedge clk);
      end
      in_valid = 0;
      while (busy) @(negedge clk);
      // compare the beats
      check(beats_seen.size() == hdr + beats.size(),
            $sformatf("burst %0d: %0d beats, expected %0d", it, beats_seen.size(), hdr + beats.size()));
      if (beats_seen.size() == hdr + beats.size()) begin
        if (hdr != 0) begin
        check(beats_seen[0] == ((int'(PH_CTRL) << 16) | int'(16'(req_ctrl))), "control beat");
        check(beats_seen[1] == ((int'(PH_ADDR) << 16) | int'(req_addr[15:0])), "address beat 0");
        check(beats_seen[2] == ((int'(PH_ADDR) << 16) | int'(req_addr[31:16])), "address beat 1");
        end
        foreach (beats[b]) begin
          check(beats_seen[hdr+b] == ((beats[b].pi << 16) | beats[b].word),
                $sformatf("burst %0d beat %0d: %h expected pi %0d word %h", it, b,
                          beats_seen[hdr+b], beats[b].pi, beats[b].word));
        end
      end
      // without the header there is no time to fill the register ahead:
      // the first data beat follows one cycle after the request
      if (!stall_mode)
        check(busy_cycles == (data_only ? 1 : 3) + beats.size(),
              $sformatf("burst %0d: channel busy %0d cycles, expected %0d", it, busy_cycles, (data_only ? 1 : 3) + beats.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
