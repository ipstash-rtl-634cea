// tb_ipstash_bank: writes random entries into random rows and ways of one
// bank (default 4096 sets x 4 ways) through the way mask, then reads them
// back and checks the data one cycle after the read, against a shadow copy
// kept by the testbench. Also checks that a write leaves unmasked ways alone.
module tb_ipstash_bank;
  import ipstash_pkg::*;

  localparam int SETS = 4096, WAYS = 4;

  logic              clk = 1'b0;
  logic              re = 1'b0, we = 1'b0;
  logic [11:0]       addr = '0;
  logic [WAYS-1:0]   wmask = '0;
  entry_t            wdata [WAYS];
  entry_t            rdata [WAYS];

  always #5 clk = ~clk;

  ipstash_bank #(.SETS(SETS), .WAYS(WAYS)) dut (
    .clk(clk), .re(re), .we(we), .addr(addr), .wmask(wmask), .wdata(wdata), .rdata(rdata)
  );

  int checks = 0, failures = 0;
  entry_t shadow [int][WAYS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [11:0] a, input logic [WAYS-1:0] m);
    @(negedge clk);
    we = 1'b1; re = 1'b0; addr = a; wmask = m;
    for (int w = 0; w < WAYS; w++) begin
      wdata[w] = entry_t'($urandom());
      if (m[w]) shadow[int'(a)][w] = wdata[w];
    end
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd_check(input logic [11:0] a);
    @(negedge clk);
    re = 1'b1; addr = a;
    @(negedge clk);
    re = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      checks++;
      if (rdata[w] != shadow[int'(a)][w]) begin
        failures++;
        if (failures < 10) $display("FAIL row %h way %0d: %h vs %h", a, w, rdata[w], shadow[int'(a)][w]);
      end
    end
  endtask

  initial begin
    logic [11:0] rows[$];
    for (int n = 0; n < 200; n++) begin
      logic [11:0] a;
      a = 12'($urandom());
      if (!shadow.exists(int'(a))) begin
        wr(a, '1);
        rows.push_back(a);
      end
    end
    // partial writes
    for (int n = 0; n < 200; n++) wr(rows[$urandom_range(rows.size() - 1)], WAYS'($urandom()));
    foreach (rows[i]) rd_check(rows[i]);
    // the last and first rows
    wr(12'hFFF, '1); wr(12'h000, '1);
    rd_check(12'hFFF); rd_check(12'h000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
