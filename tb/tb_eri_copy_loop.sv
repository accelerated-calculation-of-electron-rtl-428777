// tb_eri_copy_loop: copies quartets out of a model of the quartet store
// (random values, n_ERI not a multiple of 16) into a model of global memory
// that accepts words with random back-pressure, and checks every stored
// word: its address (base + word index), each lane against the integral with
// linear index 16w + l in bra-pair-major order, and zero padding past the end.
// With the memory always ready it checks that the words leave on
// ceil(n_ERI/16) consecutive cycles; it also checks that a waiting word holds.
module tb_eri_copy_loop;
  import eri_pkg::*;

  localparam int unsigned NAB = 6, NCD = 10;
  localparam int NERI = NAB * NCD;
  localparam int NW = (NERI + 15) / 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic [31:0] base_addr = 0;
  logic [idx_w(NAB)-1:0] rd_bank [MEM_LANES];
  logic [idx_w(NCD)-1:0] rd_addr [MEM_LANES];
  fp32_t rd_data [MEM_LANES];
  logic mem_valid, mem_ready = 1;
  logic [31:0] mem_addr;
  logic [MEM_BITS-1:0] mem_data;

  eri_copy_loop #(.NAB(NAB), .NCD(NCD), .AW(32)) dut (.*);

  fp32_t store [NAB][NCD];
  always_comb
    for (int l = 0; l < 16; l++)
      rd_data[l] = (rd_bank[l] < NAB && rd_addr[l] < NCD) ? store[rd_bank[l]][rd_addr[l]] : '1;

  int checks = 0, failures = 0;
  int words = 0, first_cyc = -1, last_cyc = -1, cyc = 0;
  int random_ready = 0;
  int held = 0;
  logic [MEM_BITS-1:0] prev_data;
  logic prev_wait = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && prev_wait) begin
      checks++;
      held++;
      if (!mem_valid || mem_data !== prev_data) begin
        failures++;
        $display("FAIL a waiting word changed");
      end
    end
    prev_wait <= rst_n && mem_valid && !mem_ready;
    prev_data <= mem_data;
    if (rst_n && mem_valid && mem_ready) begin
      int w;
      w = int'(mem_addr - base_addr);
      checks++;
      if (w != words) begin
        failures++;
        $display("FAIL word address %0d, expected %0d", w, words);
      end
      for (int l = 0; l < 16; l++) begin
        int i;
        fp32_t e;
        i = 16 * w + l;
        e = (i < NERI) ? store[i / NCD][i % NCD] : 32'd0;
        checks++;
        if (mem_data[32*l +: 32] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d lane %0d: %h vs %h", w, l, mem_data[32*l +: 32], e);
        end
      end
      if (words == 0) first_cyc = cyc;
      last_cyc = cyc;
      words++;
    end
    if (random_ready) mem_ready <= ($urandom % 3 != 0);
  end

  task automatic run(input int q, input int rr);
    foreach (store[a, c]) store[a][c] = $urandom;
    words = 0;
    random_ready = rr;
    @(negedge clk);
    base_addr = 32'(1000 * q + 7);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    random_ready = 0;
    mem_ready = 1;
    checks++;
    if (words != NW) begin
      failures++;
      $display("FAIL quartet %0d: %0d words, expected %0d", q, words, NW);
    end
    if (!rr) begin
      checks++;
      if (last_cyc - first_cyc + 1 != NW) begin
        failures++;
        $display("FAIL quartet %0d: words over %0d cycles, expected %0d", q,
                 last_cyc - first_cyc + 1, NW);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0);
    run(1, 1);
    run(2, 1);
    run(3, 0);
    checks++;
    if (held == 0) begin
      failures++;
      $display("FAIL back-pressure never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
