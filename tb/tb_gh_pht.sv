// tb_gh_pht: pattern history table at its default size (64 counters).
//
// Checks the reset value of every entry, the one-cycle read latency, that
// the read output holds while rd_en is low, read-before-write when lookup
// and update hit the same entry, and 3000 cycles of random traffic against a
// model table whose counters are updated with min/max arithmetic. A second
// instance with the hysteresis rule and a strongly-taken reset value is
// checked on the same traffic against its own model.
module tb_gh_pht;
  import gh_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       rd_en = 0, upd_en = 0, upd_taken = 0;
  logic [5:0] rd_idx = 0, upd_idx = 0;
  ctr_t       rd_ctr, rd_ctr_h;

  gh_pht u_dut (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_idx(rd_idx), .rd_ctr(rd_ctr),
    .upd_en(upd_en), .upd_idx(upd_idx), .upd_taken(upd_taken));

  gh_pht #(.IDX_W(6), .KIND(CTR_HYSTERESIS), .INIT(CTR_ST)) u_hys (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_idx(rd_idx), .rd_ctr(rd_ctr_h),
    .upd_en(upd_en), .upd_idx(upd_idx), .upd_taken(upd_taken));

  int model [64];
  int model_h [64];
  int exp_rd, exp_rd_h;
  int n_collide = 0, n_sat_hi = 0, n_sat_lo = 0;

  function automatic int sat_step(int v, logic t);
    return t ? ((v < 3) ? v + 1 : 3) : ((v > 0) ? v - 1 : 0);
  endfunction

  function automatic int hys_step(int v, logic t);
    if (t) return (v == 0) ? 1 : 3;
    return (v == 3) ? 2 : 0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (model[i]) begin model[i] = 1; model_h[i] = 3; end
    exp_rd = 1; exp_rd_h = 3;
    // reset contents, one entry per cycle
    for (int i = 0; i < 64; i++) begin
      rd_en = 1; rd_idx = 6'(i);
      @(negedge clk);
      checks++;
      if (rd_ctr !== 2'b01 || rd_ctr_h !== 2'b11) begin
        failures++; $display("entry %0d after reset: %b %b", i, rd_ctr, rd_ctr_h);
      end
    end
    // random traffic
    for (int c = 0; c < 3000; c++) begin
      rd_en     = ($urandom % 3) != 0;
      rd_idx    = 6'($urandom);
      upd_en    = ($urandom % 2) != 0;
      upd_idx   = (c % 5 == 0) ? rd_idx : 6'($urandom % 8);  // hot entries saturate
      upd_taken = (c < 1500) ? (($urandom % 4) != 0) : (($urandom % 4) == 0);
      if (rd_en) begin exp_rd = model[rd_idx]; exp_rd_h = model_h[rd_idx]; end
      if (rd_en && upd_en && rd_idx == upd_idx) n_collide++;
      if (upd_en) begin
        if (model[upd_idx] == 3 && upd_taken) n_sat_hi++;
        if (model[upd_idx] == 0 && !upd_taken) n_sat_lo++;
        model[upd_idx]   = sat_step(model[upd_idx], upd_taken);
        model_h[upd_idx] = hys_step(model_h[upd_idx], upd_taken);
      end
      @(negedge clk);
      checks++;
      if (rd_ctr !== 2'(exp_rd) || rd_ctr_h !== 2'(exp_rd_h)) begin
        failures++;
        $display("cycle %0d: read %b/%b expected %0d/%0d", c, rd_ctr, rd_ctr_h, exp_rd, exp_rd_h);
      end
    end
    checks++;
    if (n_collide == 0 || n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++; $display("coverage: collide %0d sat_hi %0d sat_lo %0d", n_collide, n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
