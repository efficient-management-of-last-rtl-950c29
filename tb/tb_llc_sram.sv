// tb_llc_sram: write/read behaviour and one-cycle read latency of the
// single-port array, against a reference copy held in the testbench.
module tb_llc_sram;
  localparam int unsigned D = 256, WD = 72;

  logic          clk = 0, en = 0, we = 0;
  logic [7:0]    addr = '0;
  logic [WD-1:0] wdata = '0, rdata;
  logic [WD-1:0] ref_mem [D];

  llc_sram #(.DEPTH(D), .WIDTH(WD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WD-1:0] held;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 8'(i); wdata = {$urandom, $urandom, 8'(i)};
      ref_mem[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr = 8'($urandom);
      en   = 1;
      we   = ($urandom_range(0, 3) == 0);
      wdata = {$urandom, $urandom, $urandom};
      if (we) ref_mem[addr] = wdata;
      else begin
        held = ref_mem[addr];
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== held) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d", addr);
        end
        // rdata holds while en is low
        @(negedge clk);
        checks++;
        if (rdata !== held) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
