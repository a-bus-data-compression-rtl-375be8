// tb_bdc_queue: random pushes and pops, within the limits the queue states,
// against a SystemVerilog queue as reference; count and the visible head are
// compared every cycle, including after a clear.
module tb_bdc_queue;
  localparam int EW = 6, DEPTH = 16, NIN = 8, NOUT = 4;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [3:0]               push_n;
  logic [NIN-1:0][EW-1:0]   push_data;
  logic [2:0]               pop_n;
  logic [4:0]               count;
  logic [NOUT-1:0][EW-1:0]  head;
  int checks = 0, failures = 0;
  int model[$];

  bdc_queue #(.EW(EW), .DEPTH(DEPTH), .NIN(NIN), .NOUT(NOUT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_n = 0; pop_n = 0; push_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int pn, qn, room;
      @(negedge clk);
      // compare state
      checks++;
      if (int'(count) != model.size()) begin
        failures++;
        $display("cycle %0d count %0d expected %0d", it, count, model.size());
      end
      for (int i = 0; i < NOUT && i < model.size(); i++) begin
        checks++;
        if (int'(head[i]) != model[i]) begin
          failures++;
          $display("cycle %0d head[%0d]=%0d expected %0d", it, i, head[i], model[i]);
        end
      end
      clear = (it % 997 == 500);
      qn    = $urandom_range(0, (model.size() < NOUT) ? model.size() : NOUT);
      room  = DEPTH - model.size() + qn;
      pn    = $urandom_range(0, (room < NIN) ? room : NIN);
      pop_n  = 3'(qn);
      push_n = 4'(pn);
      for (int j = 0; j < NIN; j++) push_data[j] = EW'($urandom);
      @(posedge clk);
      #1;
      if (clear) model.delete();
      else begin
        for (int j = 0; j < qn; j++) void'(model.pop_front());
        for (int j = 0; j < pn; j++) model.push_back(int'(push_data[j]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
