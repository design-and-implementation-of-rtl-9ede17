// Test of the two-bank data memory: random 16- and 32-bit writes at any halfword address
// (halfword enables included) against a halfword model, then random 32-bit reads at any
// halfword address, checked one cycle later.
module data_memory_tb;
  localparam int unsigned BYTES = 2048;
  localparam int unsigned AW = $clog2(BYTES / 2);
  localparam int unsigned NHW = BYTES / 2;

  logic          clk = 1'b0, en, we;
  logic [1:0]    be;
  logic [AW-1:0] addr;
  logic [31:0]   wdata, rdata;
  logic [15:0]   model [NHW];
  int checks = 0, failures = 0;

  data_memory #(.BYTES(BYTES)) dut (.clk, .en, .we, .be, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    en = 1'b0; we = 1'b0; be = '0; addr = '0; wdata = '0;
    // fill every halfword
    for (int h = 0; h < NHW; h += 2) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; be = 2'b11; addr = AW'(h); wdata = $urandom;
      model[h] = wdata[15:0]; model[h+1] = wdata[31:16];
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = $urandom_range(NHW - 2);
      addr = AW'(a);
      en = 1'b1;
      we = 1'($urandom_range(1));
      be = 2'($urandom_range(1, 3));
      wdata = $urandom;
      if (we) begin
        if (be[0]) model[a] = wdata[15:0];
        if (be[1]) model[a+1] = wdata[31:16];
      end else begin
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (rdata != {model[a+1], model[a]}) begin
          failures++;
          $display("FAIL read at %0d: %h expected %h", a, rdata, {model[a+1], model[a]});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
