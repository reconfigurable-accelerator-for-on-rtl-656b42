// tb_sar_trig_mem: self-checking test of the sine/cosine memories.
//
// Writes every address in a shuffled order, reads all back in order and in
// random order, checks the one-cycle read latency, that the read data holds
// while re is low, and that a read of the address being written returns the
// old word.
module tb_sar_trig_mem;
  import sar_pkg::*;

  localparam int DEPTH = 512;

  logic       clk = 0;
  logic       we = 0, re = 0;
  logic [8:0] waddr = '0, raddr = '0;
  f32_t       wsin = '0, wcos = '0, rsin, rcos;

  int checks = 0, failures = 0;
  f32_t ms [DEPTH], mc [DEPTH];

  sar_trig_mem dut (.*);

  always #5 clk = ~clk;

  task automatic expect_data(input f32_t s, input f32_t c, input string what);
    checks++;
    if (rsin != s || rcos != c) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h %h expected %h %h", what, rsin, rcos, s, c);
    end
  endtask

  initial begin
    int order [DEPTH];
    for (int i = 0; i < DEPTH; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 9'(order[i]); wsin = $urandom; wcos = $urandom;
      ms[order[i]] = wsin; mc[order[i]] = wcos;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); re = 1; raddr = 9'(i);
      @(posedge clk); #1;
      expect_data(ms[i], mc[i], $sformatf("read %0d", i));
    end
    for (int i = 0; i < 2000; i++) begin
      int a;
      f32_t os, oc;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk); re = 1; raddr = 9'(a);
      if (i % 3 == 0) begin
        // Write the same address in the same cycle: the read sees the old word.
        we = 1; waddr = 9'(a); wsin = $urandom; wcos = $urandom;
      end else begin
        we = 0;
      end
      @(posedge clk); #1;
      expect_data(ms[a], mc[a], $sformatf("random read %0d", a));
      os = ms[a]; oc = mc[a];
      if (we) begin ms[a] = wsin; mc[a] = wcos; end
      // Hold: with re low the output must not change.
      @(negedge clk); re = 0; we = 0; raddr = 9'($urandom);
      @(posedge clk); #1;
      expect_data(os, oc, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
