// tb_bdc_sram_reader: a memory model answers the SRAM port one cycle after
// each read; a stand-in for the slave transmitter takes the burst request and
// the data groups with random READY.  For random read headers (lengths 1..256,
// random start groups) checks that the request carries the header's control
// word, that exactly the right SRAM groups come out in order, that write
// headers are ignored, and that with READY always high one group leaves per
// clock after the first read.
module tb_bdc_sram_reader;
  import bdc_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        hdr_valid;
  ctrl_word_t  hdr_ctrl;
  logic [31:0] hdr_addr;
  logic        tx_req_valid, tx_req_ready;
  ctrl_word_t  tx_req_ctrl;
  logic        tx_in_valid, tx_in_ready;
  logic [31:0] tx_in_data;
  logic        sram_re;
  logic [11:0] sram_addr;
  logic [31:0] sram_rdata;
  logic        busy;
  logic [31:0] mem [4096];
  int checks = 0, failures = 0;
  bit stall_mode;
  logic [31:0] got[$];
  ctrl_word_t  req_seen[$];
  int first_pop, last_pop, cyc;

  bdc_sram_reader dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("mismatch: %s", what);
    end
  endtask

  // synchronous SRAM
  always @(posedge clk) if (sram_re) sram_rdata <= mem[sram_addr];

  // transmitter stand-in
  always @(posedge clk) begin
    cyc++;
    if (rst_n && tx_req_valid && tx_req_ready) req_seen.push_back(tx_req_ctrl);
    if (rst_n && tx_in_valid && tx_in_ready) begin
      got.push_back(tx_in_data);
      if (first_pop < 0) first_pop = cyc;
      last_pop = cyc;
    end
  end
  always @(negedge clk) begin
    tx_req_ready <= stall_mode ? ($urandom_range(0, 3) == 0) : 1'b1;
    tx_in_ready  <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    hdr_valid = 0; hdr_ctrl = '0; hdr_addr = '0; stall_mode = 0;
    sram_rdata = '0; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int len, ngroups, start;
      bit wr;
      stall_mode = it[0];
      wr      = (it % 10 == 7);
      len     = (it % 6 == 0) ? 256 : $urandom_range(1, 256);
      ngroups = (len + 3) / 4;
      start   = $urandom_range(0, 4095 - ngroups);
      got.delete();
      req_seen.delete();
      first_pop = -1;
      @(negedge clk);
      hdr_valid        = 1;
      hdr_ctrl         = '0;
      hdr_ctrl.cmp_en  = 1'($urandom);
      hdr_ctrl.cache   = 2'($urandom);
      hdr_ctrl.traffic = wr ? TR_WRITE : TR_READ;
      hdr_ctrl.len_m1  = 8'(len - 1);
      hdr_addr         = 32'(start * 4 + $urandom_range(0, 3));
      @(negedge clk);
      hdr_valid = 0;
      @(negedge clk);
      while (busy) @(negedge clk);
      if (wr) begin
        check(req_seen.size() == 0 && got.size() == 0, $sformatf("burst %0d: write header not ignored", it));
        continue;
      end
      check(req_seen.size() == 1 && req_seen[0] == hdr_ctrl, $sformatf("burst %0d: burst request", it));
      check(got.size() == ngroups, $sformatf("burst %0d: %0d groups, expected %0d", it, got.size(), ngroups));
      if (got.size() == ngroups)
        foreach (got[g]) check(got[g] == mem[start + g], $sformatf("burst %0d group %0d", it, g));
      if (!stall_mode)
        check(last_pop - first_pop == ngroups - 1,
              $sformatf("burst %0d: %0d groups took %0d cycles", it, ngroups, last_pop - first_pop + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
