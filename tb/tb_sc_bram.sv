// tb_sc_bram: sc_bram against an array model.
//
// Random reads and writes on both ports (byte-enable writes on port A, word
// writes on port B) at a reduced depth of 64 words; every read result is
// compared with the model one cycle later, as the RAM reads synchronously.
// Both ports share one clock in that phase and never access the same word in
// the same cycle while either writes. A second phase runs port B on its own,
// faster clock: it rewrites the upper half while port A reads the lower half
// on the first clock, and port A then reads everything back.
`timescale 1ns/1ps
module tb_sc_bram;
  localparam int D = 64;
  logic clk = 0, clkb = 0, sep = 0, clk_b;
  always #5 clk = ~clk;
  always #3.5 clkb = ~clkb;
  assign clk_b = sep ? clkb : clk;
  logic a_en = 0, b_en = 0, b_we = 0;
  logic [15:0] a_we = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic [127:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [127:0] model [D];
  int checks = 0, failures = 0;

  sc_bram #(.DEPTH(D), .W(128)) dut (.clk_a(clk), .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                    .clk_b, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [127:0] ea, eb;
    bit ra, rb;
    // initialise through port B
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 6'(i); b_wdata = {4{$urandom}};
      model[i] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      a_en = $urandom % 2; b_en = $urandom % 2;
      a_addr = $urandom; b_addr = ($urandom % 8 == 0) ? a_addr : 6'($urandom);
      a_we = ($urandom % 2) ? 16'($urandom) : 16'h0;
      b_we = $urandom % 2;
      if (b_addr == a_addr && a_en && b_en && (a_we != 0 || b_we)) b_addr = b_addr + 6'd1;
      a_wdata = {$urandom, $urandom, $urandom, $urandom};
      b_wdata = {$urandom, $urandom, $urandom, $urandom};
      ra = a_en; rb = b_en;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_en) for (int i = 0; i < 16; i++) if (a_we[i]) model[a_addr][8*i +: 8] = a_wdata[8*i +: 8];
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (ra) check(a_rdata == ea, "port A read");
      if (rb) check(b_rdata == eb, "port B read");
    end
    @(negedge clk); a_en = 0; b_en = 0;
    // second phase: independent clocks
    @(negedge clk); sep = 1;
    fork
      for (int i = D / 2; i < D; i++) begin
        @(negedge clkb); b_en = 1; b_we = 1; b_addr = 6'(i); b_wdata = {4{$urandom}};
        model[i] = b_wdata;
        @(posedge clkb);
      end
      for (int i = 0; i < D / 2; i++) begin
        @(negedge clk); a_en = 1; a_we = 0; a_addr = 6'(i);
        @(posedge clk); #1;
        check(a_rdata == model[i], "port A read while port B writes on its own clock");
      end
    join
    @(negedge clkb); b_en = 0; b_we = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_en = 1; a_we = 0; a_addr = 6'(i);
      @(posedge clk); #1;
      check(a_rdata == model[i], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
