// tb_eri_buffer: writes random columns (one word per bank) into both slots of
// the quartet store, keeps a shadow copy, and compares 16-lane reads from
// random banks and addresses with it, including reads of one slot during
// writes to the other and reads of the same bank on several lanes.
module tb_eri_buffer;
  import eri_pkg::*;

  localparam int unsigned NAB = 6, NCD = 9;

  logic clk = 0;
  always #5 clk = ~clk;

  logic  wr_en = 0, wr_slot = 0;
  logic [idx_w(NCD)-1:0] wr_addr = 0;
  fp32_t wr_data [NAB];
  logic  rd_slot = 0;
  logic [idx_w(NAB)-1:0] rd_bank [MEM_LANES];
  logic [idx_w(NCD)-1:0] rd_addr [MEM_LANES];
  fp32_t rd_data [MEM_LANES];

  eri_buffer #(.NAB(NAB), .NCD(NCD)) dut (.*);

  fp32_t shadow [2][NAB][NCD];
  int checks = 0, failures = 0;

  task automatic fill(input int s);
    for (int cd = 0; cd < int'(NCD); cd++) begin
      wr_en <= 1; wr_slot <= 1'(s); wr_addr <= $bits(wr_addr)'(cd);
      for (int ab = 0; ab < int'(NAB); ab++) begin
        fp32_t v = $urandom;
        wr_data[ab] <= v;
        shadow[s][ab][cd] = v;
      end
      @(posedge clk);
    end
    wr_en <= 0;
  endtask

  task automatic reads(input int n, input int only_slot);
    for (int i = 0; i < n; i++) begin
      int s, bk [MEM_LANES], ad [MEM_LANES];
      @(negedge clk);
      s = (only_slot >= 0) ? only_slot : int'($urandom % 2);
      rd_slot = 1'(s);
      for (int l = 0; l < int'(MEM_LANES); l++) begin
        bk[l] = (i % 3 == 0) ? 2 : int'($urandom % NAB);
        ad[l] = $urandom % NCD;
        rd_bank[l] = $bits(rd_bank[l])'(bk[l]);
        rd_addr[l] = $bits(rd_addr[l])'(ad[l]);
      end
      #1;
      for (int l = 0; l < int'(MEM_LANES); l++) begin
        checks++;
        if (rd_data[l] !== shadow[s][bk[l]][ad[l]]) begin
          failures++;
          if (failures < 10)
            $display("FAIL lane %0d slot %0d bank %0d addr %0d: %h vs %h", l, s, bk[l], ad[l],
                     rd_data[l], shadow[s][bk[l]][ad[l]]);
        end
      end
    end
  endtask

  initial begin
    foreach (rd_bank[l]) begin rd_bank[l] = 0; rd_addr[l] = 0; end
    foreach (wr_data[i]) wr_data[i] = 0;
    @(posedge clk);
    fill(0);
    fill(1);
    reads(100, -1);
    fork
      fill(0);
      reads(int'(NCD) - 1, 1);
    join
    reads(100, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
