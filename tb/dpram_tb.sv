// dpram_tb - writes and reads the dual-port RAM from both ports: data
// written on one port is read on the other, reads have one clock of latency,
// the full 32K address range is distinct, and disabled ports do nothing.
`timescale 1ns / 1ps
module dpram_tb;
  localparam int AW = 15;
  logic clk = 1'b0;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  dpram dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
             .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pat(input int a);
    return 32'(a) * 32'h9E37_79B1 ^ 32'h5A5A_0000;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    @(negedge clk);
    // port A writes every address
    for (int a = 0; a < 2**AW; a++) begin
      a_en = 1; a_we = 1; a_addr = AW'(a); a_wdata = pat(a);
      @(negedge clk);
    end
    a_en = 0; a_we = 0;
    // port B reads every address, data one clock later
    for (int a = 0; a < 2**AW; a++) begin
      b_en = 1; b_addr = AW'(a);
      @(negedge clk);
      if (a % 97 == 0 || a == 2**AW-1) check(b_rdata === pat(a), $sformatf("B read %0d got %h", a, b_rdata));
    end
    b_en = 0;
    // port B writes, port A reads in the same cycles at other addresses
    for (int a = 0; a < 64; a++) begin
      b_en = 1; b_we = 1; b_addr = AW'(a); b_wdata = ~pat(a);
      a_en = 1; a_we = 0; a_addr = AW'(a + 1000);
      @(negedge clk);
      check(a_rdata === pat(a + 1000), "A read during B write");
    end
    b_en = 0; b_we = 0;
    for (int a = 0; a < 64; a++) begin
      a_addr = AW'(a); @(negedge clk);
      check(a_rdata === ~pat(a), $sformatf("A reads B's write %0d", a));
    end
    // read data holds while the port is disabled, a disabled write is ignored
    a_en = 0; b_en = 0; b_we = 1; b_addr = 15'd5; b_wdata = 32'hDEAD_BEEF;
    @(negedge clk);
    check(a_rdata === ~pat(63), "rdata held while disabled");
    b_we = 0; a_en = 1; a_addr = 15'd5; @(negedge clk);
    check(a_rdata === ~pat(5), "disabled write changed memory");
    // same address both ports: port B wins
    a_en = 1; a_we = 1; a_addr = 15'd7; a_wdata = 32'h1111_1111;
    b_en = 1; b_we = 1; b_addr = 15'd7; b_wdata = 32'h2222_2222;
    @(negedge clk);
    a_we = 0; b_en = 0; b_we = 0; @(negedge clk);
    check(a_rdata === 32'h2222_2222, "write collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
