// mesh_router: router of the 2-D mesh that joins the 8x8 PEs and the central buffer.
//
// Five ports: 0 = north (row y-1), 1 = east (column x+1), 2 = south (row y+1),
// 3 = west (column x-1, or the central buffer at column 0), 4 = local PE. Every
// packet is a single flit (candles_pkg::flit_t). Each input has a two-entry FIFO, so
// in_ready is a registered "not full" and no combinational path runs from one router
// to the next. Routing is dimension-ordered: a flit for the central buffer always
// goes west (the buffer sits on the west edge of every row); any other flit moves
// along the row to its column, then along the column to its row, then leaves on the
// local port. Dimension-ordered routing of single-flit packets cannot deadlock. Each
// output picks among the inputs that want it in round-robin order and sends one flit
// per cycle when the far side is ready (valid/ready handshake: a flit moves in a
// cycle where valid and ready are both high). idle is high when all FIFOs are empty.
// The mesh itself follows the published design, which does not describe the router;
// everything here is this design's own choice.
module mesh_router
  import candles_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid  [5],
  input  flit_t  in_flit   [5],
  output logic   in_ready  [5],
  output logic   idle,
  output logic   out_valid [5],
  output flit_t  out_flit  [5],
  input  logic   out_ready [5]
);
  flit_t      fifo [5][2];
  logic [1:0] cnt  [5];
  logic [2:0] route [5];
  logic [2:0] rr   [5];
  logic [2:0] sel  [5];
  logic       pop  [5];

  function automatic logic [2:0] route_of(flit_t f);
    if (f.to_cb)                  return 3'd3;
    else if (32'(f.dx) > X)       return 3'd1;
    else if (32'(f.dx) < X)       return 3'd3;
    else if (32'(f.dy) > Y)       return 3'd2;
    else if (32'(f.dy) < Y)       return 3'd0;
    else                          return 3'd4;
  endfunction

  always_comb begin
    idle = 1'b1;
    for (int p = 0; p < 5; p++) begin
      if (cnt[p] != 2'd0) idle = 1'b0;
      route[p]    = route_of(fifo[p][0]);
      in_ready[p] = (cnt[p] != 2'd2);
      pop[p]      = 1'b0;
    end
    for (int o = 0; o < 5; o++) begin
      out_valid[o] = 1'b0;
      out_flit[o]  = fifo[0][0];
      sel[o]       = 3'd0;
      for (int k = 4; k >= 0; k--) begin
        int p;
        p = (int'(rr[o]) + k) % 5;
        if (cnt[p] != 2'd0 && route[p] == 3'(o)) begin
          out_valid[o] = 1'b1;
          sel[o] = 3'(p);
        end
      end
      if (out_valid[o]) begin
        out_flit[o] = fifo[sel[o]][0];
        if (out_ready[o]) pop[sel[o]] = 1'b1;
      end
    end
  end

  logic [4:0] push;
  always_comb
    for (int p = 0; p < 5; p++) push[p] = in_valid[p] && in_ready[p];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 5; p++) begin
        cnt[p] <= '0;
        rr[p]  <= '0;
        fifo[p][0] <= '0;
        fifo[p][1] <= '0;
      end
    end else begin
      for (int p = 0; p < 5; p++) begin
        case ({push[p], pop[p]})
          2'b10: begin
            fifo[p][cnt[p][0]] <= in_flit[p];
            cnt[p] <= cnt[p] + 2'd1;
          end
          2'b01: begin
            fifo[p][0] <= fifo[p][1];
            cnt[p] <= cnt[p] - 2'd1;
          end
          2'b11: begin
            if (cnt[p] == 2'd1) fifo[p][0] <= in_flit[p];
            else begin
              fifo[p][0] <= fifo[p][1];
              fifo[p][1] <= in_flit[p];
            end
          end
          default: ;
        endcase
      end
      for (int o = 0; o < 5; o++)
        if (out_valid[o] && out_ready[o]) rr[o] <= (sel[o] == 3'd4) ? 3'd0 : sel[o] + 3'd1;
    end
  end
endmodule
