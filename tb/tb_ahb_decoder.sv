// tb_ahb_decoder: self-checking test of the address decoder.
// Drives random and corner addresses into a four-slave decoder and a
// three-slave decoder and compares HSELx with the expected region select
// (top two address bits), including the unmapped fourth region of the
// three-slave map, which must select nothing.
module tb_ahb_decoder;
  import ahb_pkg::*;

  logic [ADDR_W-1:0] haddr;
  logic [3:0]        hsel4;
  logic [2:0]        hsel3;
  int checks = 0, failures = 0;

  ahb_decoder #(.NUM_SLAVES(4)) dut4 (.haddr(haddr), .hsel(hsel4));
  ahb_decoder #(.NUM_SLAVES(3)) dut3 (.haddr(haddr), .hsel(hsel3));

  task automatic check(input logic [ADDR_W-1:0] a);
    logic [3:0] exp4;
    logic [2:0] exp3;
    haddr = a;
    #1;
    exp4 = 4'b0001 << a[31:30];
    exp3 = (a[31:30] == 2'd3) ? 3'b000 : 3'(3'b001 << a[31:30]);
    checks++;
    if (hsel4 !== exp4) begin
      failures++;
      $display("FAIL addr=%h hsel4=%b exp=%b", a, hsel4, exp4);
    end
    checks++;
    if (hsel3 !== exp3) begin
      failures++;
      $display("FAIL addr=%h hsel3=%b exp=%b", a, hsel3, exp3);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0000_0000);
    check(32'h3FFF_FFFF);
    check(32'h4000_0000);
    check(32'h7FFF_FFFC);
    check(32'h8000_0000);
    check(32'hBFFF_FFFF);
    check(32'hC000_0000);
    check(32'hFFFF_FFFF);
    for (int i = 0; i < 200; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
