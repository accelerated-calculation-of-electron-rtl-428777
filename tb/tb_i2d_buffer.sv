// tb_i2d_buffer: fills both slots of the 2-D integral store slice by slice
// with random words, keeps a plain shadow copy of the 6-D array, and compares
// every read (random slot and random per-direction c and d powers) with the
// shadow copy, including reads of one slot while the other is being written.
module tb_i2d_buffer;
  import eri_pkg::*;

  localparam int unsigned LA = 1, LB = 2, LC = 2, LD = 1, NRYS = 3;

  logic clk = 0;
  always #5 clk = ~clk;

  logic  wr_en = 0, wr_slot = 0;
  logic [1:0] wr_dir = 0;
  logic [idx_w(NRYS)-1:0] wr_root = 0;
  logic [idx_w(LD+1)-1:0] wr_d = 0;
  fp32_t wr_slice [LA+1][LB+1][LC+1];
  logic  rd_slot = 0;
  logic [idx_w(LC+1)-1:0] rd_c [3];
  logic [idx_w(LD+1)-1:0] rd_d [3];
  fp32_t rd_data [3][NRYS][LA+1][LB+1];

  i2d_buffer #(.LA(LA), .LB(LB), .LC(LC), .LD(LD), .NRYS(NRYS)) dut (.*);

  fp32_t shadow [2][3][NRYS][LA+1][LB+1][LC+1][LD+1];
  int checks = 0, failures = 0;

  task automatic write_slot(input int s);
    for (int mu = 0; mu < 3; mu++)
      for (int nu = 0; nu < int'(NRYS); nu++)
        for (int d = 0; d <= int'(LD); d++) begin
          wr_en <= 1; wr_slot <= 1'(s); wr_dir <= 2'(mu);
          wr_root <= $bits(wr_root)'(nu); wr_d <= $bits(wr_d)'(d);
          for (int a = 0; a <= int'(LA); a++)
            for (int b = 0; b <= int'(LB); b++)
              for (int c = 0; c <= int'(LC); c++) begin
                fp32_t v = $urandom;
                wr_slice[a][b][c] <= v;
                shadow[s][mu][nu][a][b][c][d] = v;
              end
          @(posedge clk);
        end
    wr_en <= 0;
  endtask

  task automatic read_check(input int n);
    for (int i = 0; i < n; i++) begin
      int s;
      int cc [3];
      int dd [3];
      s = $urandom % 2;
      rd_slot = 1'(s);
      for (int mu = 0; mu < 3; mu++) begin
        cc[mu] = $urandom % (LC + 1);
        dd[mu] = $urandom % (LD + 1);
        rd_c[mu] = $bits(rd_c[mu])'(cc[mu]);
        rd_d[mu] = $bits(rd_d[mu])'(dd[mu]);
      end
      #1;
      for (int mu = 0; mu < 3; mu++)
        for (int nu = 0; nu < int'(NRYS); nu++)
          for (int a = 0; a <= int'(LA); a++)
            for (int b = 0; b <= int'(LB); b++) begin
              checks++;
              if (rd_data[mu][nu][a][b] !== shadow[s][mu][nu][a][b][cc[mu]][dd[mu]]) begin
                failures++;
                if (failures < 10)
                  $display("FAIL slot %0d mu %0d nu %0d a %0d b %0d c %0d d %0d: %h vs %h", s, mu,
                           nu, a, b, cc[mu], dd[mu], rd_data[mu][nu][a][b],
                           shadow[s][mu][nu][a][b][cc[mu]][dd[mu]]);
              end
            end
    end
  endtask

  initial begin
    foreach (rd_c[i]) begin rd_c[i] = 0; rd_d[i] = 0; end
    foreach (wr_slice[a, b, c]) wr_slice[a][b][c] = 0;
    @(posedge clk);
    write_slot(0);
    write_slot(1);
    @(posedge clk);
    read_check(200);
    // rewrite slot 0 while slot 1 stays readable
    fork
      write_slot(0);
      begin
        // the shadow of slot 1 does not change while slot 0 is written
        for (int i = 0; i < 5; i++) begin
          @(negedge clk);
          rd_slot = 1;
          for (int mu = 0; mu < 3; mu++) begin rd_c[mu] = 1; rd_d[mu] = 0; end
          #1;
          checks++;
          if (rd_data[2][NRYS-1][LA][LB] !== shadow[1][2][NRYS-1][LA][LB][1][0]) failures++;
        end
      end
    join
    @(posedge clk);
    read_check(200);
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
