// tb_mesh_router: one router at column 3, row 3. Random flits with random
// destinations (including the central buffer) enter all five inputs, outputs are
// randomly stalled. Every flit must leave exactly once, unchanged, on the port that
// dimension-ordered routing selects.
module tb_mesh_router;
  import candles_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  in_valid [5], in_ready [5], out_valid [5], out_ready [5], idle;
  flit_t in_flit [5], out_flit [5];
  int sent = 0, recvd = 0;
  logic [2:0] exp_port [int];
  int checks = 0, failures = 0;

  mesh_router #(.X(3), .Y(3)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [2:0] ref_port(flit_t f);
    if (f.to_cb) return 3;
    if (f.dx > 3) return 1;
    if (f.dx < 3) return 3;
    if (f.dy > 3) return 2;
    if (f.dy < 3) return 0;
    return 4;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receivers
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++)
      if (out_valid[o] && out_ready[o]) begin
        int id;
        id = int'(out_flit[o].addr);
        checks++;
        if (!exp_port.exists(id)) begin failures++; $display("FAIL unknown/duplicate flit %0d", id); end
        else begin
          if (exp_port[id] != 3'(o)) begin failures++; $display("FAIL flit %0d on port %0d exp %0d", id, o, exp_port[id]); end
          if (out_flit[o].data != 64'(id * 7919)) begin failures++; $display("FAIL flit %0d data", id); end
          exp_port.delete(id);
        end
        recvd++;
      end
  end

  initial begin
    for (int p = 0; p < 5; p++) begin in_valid[p] = 0; in_flit[p] = '0; out_ready[p] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(posedge clk);
      #1;
      for (int p = 0; p < 5; p++)
        if (in_valid[p] && in_ready_q[p]) sent++;
      for (int p = 0; p < 5; p++) begin
        out_ready[p] = ($urandom % 4 != 0);
        if (!in_valid[p] || in_ready_q[p]) begin
          in_valid[p] = (cyc < 2500) && ($urandom % 2 == 0);
          if (in_valid[p]) begin
            flit_t f;
            f = flit_t'({$urandom, $urandom, $urandom});
            f.to_cb = ($urandom % 6 == 0);
            f.addr = 16'(cyc * 5 + p);
            f.data = 64'((cyc * 5 + p) * 7919);
            in_flit[p] = f;
            exp_port[cyc * 5 + p] = ref_port(f);
          end
        end
      end
    end
    for (int p = 0; p < 5; p++) out_ready[p] = 1;
    repeat (20) @(posedge clk);
    checks += 2;
    if (exp_port.size() != 0) begin failures++; $display("FAIL %0d flits lost", exp_port.size()); end
    if (!idle) begin failures++; $display("FAIL not idle"); end
    $display("sent=%0d received=%0d", sent, recvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ready as seen at the last clock edge (a flit offered then was taken)
  logic in_ready_q [5];
  always @(posedge clk) for (int p = 0; p < 5; p++) in_ready_q[p] <= in_ready[p];
endmodule
