// Self-checking test of the coefficient look-up table. Random words (some
// left invalid) are written, then random (p-p amplitude, period) queries are
// compared with a reference nearest-neighbour search (sum of absolute
// differences, lowest address on a tie). Also checked: an empty table gives
// hit = 0, done comes LUT_DEPTH + 1 clocks after lookup, and busy covers the
// search.
`timescale 1ns/1ps
module tb_coef_lut;
  import lco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0, lookup = 1'b0;
  logic [LUT_AW-1:0] wr_addr = '0;
  lut_entry_t wr_data = '0, model [LUT_DEPTH];
  logic [E_W:0] a_pp = '0;
  logic [CNT_W-1:0] t_lc = '0;
  coef_t coef;
  logic [EST_W-1:0] est_r, est_c;
  logic hit, busy, done;
  coef_lut dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .lookup, .a_pp, .t_lc,
                .coef, .est_r, .est_c, .hit, .busy, .done);
  int checks = 0, failures = 0;
  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic query(int pp, int t, output int lat);
    @(negedge clk) begin lookup = 1'b1; a_pp = (E_W+1)'(pp); t_lc = CNT_W'(t); end
    @(negedge clk) lookup = 1'b0;
    lat = 1;
    while (!done) begin
      if (!busy) begin failures++; $display("FAIL: busy low during search"); end
      @(negedge clk); lat++;
    end
  endtask
  initial begin
    int lat, best, bd, d;
    repeat (3) @(posedge clk); rst_n = 1'b1;
    query(20, 30, lat);
    checks++; if (hit) begin failures++; $display("FAIL: hit on empty table"); end
    checks++; if (lat != LUT_DEPTH + 1) begin failures++; $display("FAIL: latency %0d", lat); end
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < LUT_DEPTH; i++) begin
        lut_entry_t w;
        w = '0;
        w.valid  = ($urandom_range(0, 3) != 0);
        w.a_pp   = (E_W+1)'($urandom_range(0, 60));
        w.t_lc   = CNT_W'($urandom_range(10, 80));
        w.coef.a = COEF_W'($urandom);
        w.coef.b = COEF_W'($urandom);
        w.coef.c = COEF_W'($urandom);
        w.est_r  = EST_W'($urandom);
        w.est_c  = EST_W'($urandom);
        model[i] = w;
        @(negedge clk) begin wr_en = 1'b1; wr_addr = LUT_AW'(i); wr_data = w; end
      end
      @(negedge clk) wr_en = 1'b0;
      for (int q = 0; q < 10; q++) begin
        int qp, qt;
        qp = $urandom_range(0, 70); qt = $urandom_range(0, 90);
        query(qp, qt, lat);
        best = -1; bd = 0;
        for (int i = 0; i < LUT_DEPTH; i++) if (model[i].valid) begin
          d = (qp > int'(model[i].a_pp) ? qp - int'(model[i].a_pp) : int'(model[i].a_pp) - qp)
            + (qt > int'(model[i].t_lc) ? qt - int'(model[i].t_lc) : int'(model[i].t_lc) - qt);
          if (best < 0 || d < bd) begin best = i; bd = d; end
        end
        checks++;
        if (hit != (best >= 0)) begin failures++; $display("FAIL: hit %b", hit); end
        else if (best >= 0 && (coef != model[best].coef || est_r != model[best].est_r ||
                               est_c != model[best].est_c)) begin
          failures++; $display("FAIL: query (%0d,%0d) expected word %0d", qp, qt, best);
        end
        checks++; if (lat != LUT_DEPTH + 1) begin failures++; $display("FAIL: latency %0d", lat); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
