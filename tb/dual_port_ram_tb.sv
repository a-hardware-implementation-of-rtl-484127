// Self-checking testbench for dual_port_ram with a 200 MHz write clock and
// a 100 MHz read clock: the whole memory is filled with random words on
// port A, then read back on port B in random order; each read word must
// appear one read clock after its address. A second fill overwrites half
// the words and the read-back checks old and new data.
`timescale 1ns/1ps
module dual_port_ram_tb;
  localparam int AW = 10, DW = 14;
  logic clk_a = 1'b0, clk_b = 1'b0;
  logic we_a = 1'b0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic [DW-1:0] din_a = '0, dout_b;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  always #2.5 clk_a = ~clk_a;
  always #5   clk_b = ~clk_b;

  dual_port_ram dut (.clk_a, .we_a, .addr_a, .din_a, .clk_b, .addr_b, .dout_b);

  task automatic fill(input int step);
    for (int i = 0; i < 2**AW; i += step) begin
      @(posedge clk_a);
      we_a <= 1'b1; addr_a <= AW'(i); din_a <= DW'($urandom);
      #0.1;
      model[i] = din_a;
    end
    @(posedge clk_a);
    we_a <= 1'b0;
  endtask

  task automatic readback(input int n);
    for (int i = 0; i < n; i++) begin
      logic [AW-1:0] ad;
      ad = AW'($urandom);
      @(posedge clk_b);
      addr_b <= ad;
      @(posedge clk_b);
      #0.1;
      checks++;
      if (dout_b !== model[ad]) begin
        failures++;
        $display("addr %0d got %h exp %h", ad, dout_b, model[ad]);
      end
    end
  endtask

  initial begin
    fill(1);
    readback(2000);
    fill(2);
    readback(2000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
