// tb_bit_ram: writes random bits to random addresses of a 4K x 1 RAM, keeps a
// model, and reads them back checking the one-cycle read latency and that the
// read output holds while re is low.
module tb_bit_ram;
  localparam int AW = 12;
  logic clk = 1'b0;
  always #5 clk = !clk;

  logic we = 1'b0, re = 1'b0, wd = 1'b0, rd;
  logic [AW-1:0] waddr = '0, raddr = '0;
  bit model [2**AW];
  bit written [2**AW];
  int checks = 0, failures = 0;

  bit_ram #(.AW(AW)) dut (.*);

  initial begin
    // fill every location so that any address can be checked
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we = 1'b1; waddr = AW'(a); wd = 1'($urandom); model[a] = wd;
    end
    for (int i = 0; i < 3000; i++) begin
      int a;
      @(negedge clk);
      a = int'($urandom % (2**AW));
      we = 1'($urandom); waddr = AW'($urandom); wd = 1'($urandom);
      re = 1'b1; raddr = AW'(a);
      @(posedge clk);
      if (we) model[waddr] = wd;
      #1;
      checks++;
      // read-before-write: a write to the same address shows on the next read
      if (rd !== model[a] && !(we && waddr == AW'(a))) begin
        failures++; $display("FAIL addr %0d got %0b", a, rd);
      end
      // hold
      @(negedge clk); we = 1'b0; re = 1'b0; raddr = ~raddr;
      @(posedge clk); #1;
      checks++;
      if (rd !== model[a] && !(we && waddr == AW'(a))) begin
        failures++; $display("FAIL hold addr %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic unused = written[0];
endmodule
