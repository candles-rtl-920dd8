// tb_central_buffer: a central buffer with 8 rows. Activation groups are written
// through the host port; ACTREQ flits from several PEs arrive on their rows and each
// must be answered with 64 ACT flits on the right row, addressed to the right PE and
// carrying the stored groups in channel order. RESULT flits then add values into
// output words, which are read back through the read port.
module tb_central_buffer;
  import candles_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] act_base = 16'h1000;
  logic wr_en = 0;
  logic [15:0] wr_addr = 0, rd_addr = 0;
  logic [79:0] wr_data = 0, rd_data;
  logic  in_valid [8], in_ready [8], out_valid [8], out_ready [8], idle;
  flit_t in_flit [8], out_flit [8];
  logic [31:0] st_requests, st_results;
  int checks = 0, failures = 0;
  int exp_res [int];
  int got_act [8];

  central_buffer dut (.*);
  always #5 clk = ~clk;

  function automatic logic [52:0] grp_of(int pe, int sl, int c);
    return 53'({pe[7:0], sl[3:0], c[7:0]}) * 53'd2654435761;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ACT flit checker: each row answers one request at a time, in channel order
  int next_ch [8];
  int cur_pe [8], cur_sl [8];
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < 8; r++) if (out_valid[r] && out_ready[r]) begin
      int pe;
      pe = int'(out_flit[r].dy) * 8 + int'(out_flit[r].dx);
      checks++;
      if (out_flit[r].kind != FL_ACT || out_flit[r].dy != 3'(r) || pe != cur_pe[r] ||
          out_flit[r].addr != 16'(next_ch[r]) ||
          out_flit[r].data[52:0] != grp_of(cur_pe[r], cur_sl[r], next_ch[r])) begin
        failures++; $display("FAIL act flit row %0d ch %0d", r, next_ch[r]);
      end
      next_ch[r]++;
      got_act[r]++;
    end
  end

  task automatic send(int r, flit_t f);
    in_valid[r] = 1; in_flit[r] = f;
    do @(posedge clk); while (!in_ready[r]);
    #1 in_valid[r] = 0;
  endtask

  initial begin
    for (int r = 0; r < 8; r++) begin in_valid[r] = 0; in_flit[r] = '0; out_ready[r] = 1; got_act[r] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // activation groups for PEs (x=2,y=1) slice 0 and (x=5,y=6) slice 3
    for (int c = 0; c < 64; c++) begin
      wr_en = 1; wr_addr = act_base + 16'({3'd1, 3'd2, 3'd0, 6'(c)}); wr_data = 80'(grp_of(10, 0, c));
      @(posedge clk); #1;
      wr_addr = act_base + 16'({3'd6, 3'd5, 3'd3, 6'(c)}); wr_data = 80'(grp_of(53, 3, c));
      @(posedge clk); #1;
    end
    for (int a = 0; a < 16; a++) begin
      wr_addr = 16'(16'h8000 + a); wr_data = '0; @(posedge clk); #1;
    end
    wr_en = 0;
    next_ch[1] = 0; cur_pe[1] = 10; cur_sl[1] = 0;
    next_ch[6] = 0; cur_pe[6] = 53; cur_sl[6] = 3;
    fork
      begin
        flit_t f; f = '0; f.kind = FL_ACTREQ; f.to_cb = 1; f.sx = 2; f.sy = 1; f.addr = 0;
        send(1, f);
      end
      begin
        flit_t f; f = '0; f.kind = FL_ACTREQ; f.to_cb = 1; f.sx = 5; f.sy = 6; f.addr = 3;
        send(6, f);
      end
    join
    // results from three rows into 16 words
    for (int t = 0; t < 60; t++) begin
      flit_t f; int a, v, r;
      a = $urandom % 16; v = int'($urandom % 1001) - 500; r = $urandom % 8;
      f = '0; f.kind = FL_RESULT; f.to_cb = 1; f.addr = 16'(16'h8000 + a); f.data = 64'(signed'(v));
      if (!exp_res.exists(a)) exp_res[a] = 0;
      exp_res[a] += v;
      send(r, f);
    end
    wait (idle);
    repeat (4) @(posedge clk);
    checks += 3;
    if (got_act[1] != 64 || got_act[6] != 64) begin failures++; $display("FAIL act count %0d %0d", got_act[1], got_act[6]); end
    if (st_requests != 2) begin failures++; $display("FAIL requests %0d", st_requests); end
    if (st_results != 60) begin failures++; $display("FAIL results %0d", st_results); end
    for (int a = 0; a < 16; a++) begin
      int e;
      e = exp_res.exists(a) ? exp_res[a] : 0;
      rd_addr = 16'(16'h8000 + a);
      @(posedge clk); #1;
      checks++;
      if (int'(psum_t'(rd_data[23:0])) != e) begin failures++; $display("FAIL word %0d got %0d exp %0d", a, psum_t'(rd_data[23:0]), e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
