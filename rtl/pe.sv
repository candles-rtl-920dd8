// pe: one processing element of CANDLES.
//
// The PE computes the partial sums of one activation tile (7x4 pixels) for its 64
// kernels over its 64 input channels, with pixel-first compressed operands but a
// channel-first traversal, so consecutive cycles update the same few output neurons.
//
// Loop order of a job: for each activation slice s (n_slices), for each weight pass
// w (n_wpos), for each kernel group kg of four kernels (n_kg), for each channel c
// whose activation group and weight entry are both non-empty:
//   - the activation buffer gives the 4 non-zero activations of channel c, the weight
//     buffer the weight of channel c in each of the 4 kernels of group kg;
//   - the 4x4 multiplier array makes 16 products while the index generator makes
//     their 11-bit output tags (both from the same pipeline register);
//   - four 4x8 crossbars carry each kernel's 4 products to the 32 PSUM filters, which
//     add hits in place and push misses' victims into the 64-entry L2 banks.
// A channel whose activation or weight slice is empty is skipped without a cycle
// (per-channel valid bits). When two products of one crossbar target the same bank,
// the later one waits a cycle and operand fetch stalls (bank-conflict stall).
//
// Around the compute loop the PE talks over the mesh (single-flit packets):
//   ACTREQ to the central buffer, then 64 ACT flits fill the activation buffer
//   (one per channel) for each slice;
//   after the last slice the filters are flushed into L2;
//   inter-PE reduction: a ROLE_RECV PE sends GO to its east neighbour and adds the
//   KT*28 PSUM flits it then receives into its L2 banks; a ROLE_SEND PE waits for GO
//   and streams its L2 contents west;
//   finally a ROLE_RECV or ROLE_ALONE PE streams its non-zero L2 entries to the
//   central buffer as RESULT flits (word out_base + {k, pixel}), which adds them in.
// Reading L2 out clears it for the next job. After reset the PE spends 64 cycles
// zeroing L2. Weights and the job configuration arrive on the load port (ld_*) from
// off-chip memory; start begins a job and done stays high from its end to the next
// start.
//
// Follows the published design: 4x4 multipliers, 4x8 crossbars, 32 PSUM filters of 16
// entries, 32 banks x 64 entries, 256-activation and 4K-weight buffers, channel
// skipping, neighbour reduction where the receiver only adds. This design's own
// choices: the two-stage pipeline, the conflict stall, the flit protocol, slice-
// before-weight-pass loop order, and that products whose output neuron lies outside
// the tile are dropped (counted in st_oot).
module pe
  import candles_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0,
  parameter int WB_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // load port from off-chip memory
  input  logic        ld_en,
  input  logic        ld_is_cfg,
  input  logic [$clog2(WB_DEPTH)-1:0] ld_addr,
  input  logic [63:0] ld_data,
  // job control
  input  logic        start,
  output logic        busy,
  output logic        done,
  // mesh local port
  input  logic        in_valid,
  input  flit_t       in_flit,
  output logic        in_ready,
  output logic        out_valid,
  output flit_t       out_flit,
  input  logic        out_ready,
  // statistics since the last start
  output logic [31:0] st_hits,
  output logic [31:0] st_misses,
  output logic [31:0] st_products,
  output logic [31:0] st_conflict_stalls,
  output logic [31:0] st_skipped_ch,
  output logic [31:0] st_oot,
  output logic [31:0] st_cycles
);
  localparam int WAW = $clog2(WB_DEPTH);
  localparam int NPS = KT * TILE_PIX;           // partial sums per tile

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_REQ, S_LOAD, S_COMP, S_FLUSH, S_GO, S_WAITRED, S_WAITGO,
    S_SENDPS, S_RESULT, S_DONE
  } state_e;

  state_e     state;
  pe_cfg_t    cfg;
  logic [5:0] init_cnt;
  logic [6:0] ld_cnt;
  logic [3:0] slice;
  logic [3:0] row;
  logic [3:0] kg;
  logic [4:0] wpos;
  logic [6:0] ch;             // next channel to look at (64 = row finished)
  logic       row_start;
  logic       go_flag;
  logic [10:0] ps_cnt;
  logic [5:0] dk;             // drain kernel
  logic [4:0] dp;             // drain pixel

  // ---------------------------------------------------------------- buffers
  act_group_t       ab_rd;
  logic [CT-1:0]    ab_valid;
  logic [5:0]       ab_raddr;
  wt_entry_t        wb_rd;
  logic [CT-1:0]    wb_valid;
  logic [WAW-1:0]   wb_raddr;
  logic             ab_wr;

  assign ab_wr = (state == S_LOAD) && in_valid && in_flit.kind == FL_ACT;

  act_buffer #(.GROUPS(CT)) u_ab (
    .clk, .rst_n,
    .clear   (state == S_REQ),
    .wr_en   (ab_wr),
    .wr_addr (in_flit.addr[5:0]),
    .wr_data (act_group_t'(in_flit.data[$bits(act_group_t)-1:0])),
    .rd_addr (ab_raddr),
    .rd_data (ab_rd),
    .chan_valid (ab_valid)
  );

  weight_buffer #(.DEPTH(WB_DEPTH), .CH(CT)) u_wb (
    .clk, .rst_n,
    .wr_en   (ld_en && !ld_is_cfg),
    .wr_addr (ld_addr),
    .wr_data (wt_entry_t'(ld_data[$bits(wt_entry_t)-1:0])),
    .rd_addr (wb_raddr),
    .rd_data (wb_rd),
    .rd_row  (row),
    .row_valid (wb_valid)
  );

  // ---------------------------------------------------------------- fetch
  logic [CT-1:0] ch_mask;
  logic          found;
  logic [5:0]    next_ch;
  logic          stall;
  logic          issue;

  always_comb begin
    ch_mask = ab_valid & wb_valid;
    found   = 1'b0;
    next_ch = '0;
    for (int c = CT-1; c >= 0; c--)
      if (ch_mask[c] && 7'(c) >= ch) begin found = 1'b1; next_ch = 6'(c); end
    ab_raddr = next_ch;
    wb_raddr = WAW'({row, next_ch});
    issue    = (state == S_COMP) && found && !stall;
  end

  // ---------------------------------------------------------------- execute
  logic        op_valid;
  act_group_t  op_grp;
  wt_entry_t   op_wts;
  logic [3:0]  op_kg;
  logic [3:0][3:0] done_mask;
  logic        op_first;

  act_t  m_act [4];
  wt_t   m_wt  [4];
  psum_t prod  [4][4];
  logic [3:0][3:0] ig_valid, ig_oot;
  logic [3:0][3:0][TAG_BITS-1:0] ig_tag;
  logic [3:0][3:0] req, grant;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      m_act[i] = op_grp.val[i];
      m_wt[i]  = op_wts[i].val;
    end
  end

  mult_array u_mul (.act(m_act), .wt(m_wt), .prod(prod));

  index_gen u_ig (
    .grp(op_grp), .wts(op_wts), .kg(op_kg), .pad(cfg.pad),
    .valid(ig_valid), .tag(ig_tag), .out_of_tile(ig_oot)
  );

  assign req   = op_valid ? (ig_valid & ~done_mask) : '0;
  assign stall = |(req & ~grant);

  // crossbars and PSUM filters
  logic [NBANK-1:0]   f_upd_v;
  logic [ENTRY_BITS-1:0] f_upd_tag [NBANK];
  psum_t              f_upd_val [NBANK];
  logic [NBANK-1:0]   f_ev_v, f_hit, f_miss, f_empty;
  logic [ENTRY_BITS-1:0] f_ev_tag [NBANK];
  psum_t              f_ev_val [NBANK];
  logic               flush;

  assign flush = (state == S_FLUSH) && !op_valid;

  for (genvar f = 0; f < 4; f++) begin : g_xbar
    logic [3:0][2:0] bsel;
    logic [3:0][ENTRY_BITS-1:0] ent;
    psum_t xv [4];
    logic [7:0] ov;
    logic [7:0][ENTRY_BITS-1:0] oe;
    psum_t oval [8];
    always_comb begin
      for (int i = 0; i < 4; i++) begin
        bsel[i] = ig_tag[f][i][8:6];
        ent[i]  = ig_tag[f][i][5:0];
        xv[i]   = prod[f][i];
      end
    end
    xbar_4x8 u_x (.req(req[f]), .bank_sel(bsel), .entry(ent), .val(xv),
                  .grant(grant[f]), .out_valid(ov), .out_entry(oe), .out_val(oval));
    for (genvar j = 0; j < 8; j++) begin : g_b
      assign f_upd_v[f*8+j]   = ov[j];
      assign f_upd_tag[f*8+j] = oe[j];
      assign f_upd_val[f*8+j] = oval[j];
    end
  end

  // L2 banks: add port shared by filter evictions and received partial sums
  logic [NBANK-1:0] l2_add_en, l2_rc_en;
  logic [ENTRY_BITS-1:0] l2_add_addr [NBANK];
  psum_t            l2_add_val [NBANK];
  psum_t            l2_rc_data [NBANK];
  logic [4:0]       d_bank;
  logic [5:0]       d_entry;
  logic             d_fire;
  logic             rx_psum;
  logic [10:0]      rx_tag;

  assign rx_psum = (state == S_WAITRED) && in_valid && in_flit.kind == FL_PSUM;
  assign rx_tag  = in_flit.addr[10:0];
  assign d_bank  = {dk[1:0], dp[2:0]};
  assign d_entry = {dk[5:2], dp[4:3]};

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    psum_filter #(.ENTRIES(FILT_ENTRIES), .TAG_W(ENTRY_BITS)) u_f (
      .clk, .rst_n,
      .upd_valid (f_upd_v[b]), .upd_tag (f_upd_tag[b]), .upd_val (f_upd_val[b]),
      .flush     (flush),
      .ev_valid  (f_ev_v[b]), .ev_tag (f_ev_tag[b]), .ev_val (f_ev_val[b]),
      .hit (f_hit[b]), .miss (f_miss[b]), .empty (f_empty[b])
    );
    always_comb begin
      if (rx_psum && rx_tag[10:6] == 5'(b)) begin
        l2_add_en[b]   = 1'b1;
        l2_add_addr[b] = rx_tag[5:0];
        l2_add_val[b]  = psum_t'(in_flit.data[PSUM_W-1:0]);
      end else begin
        l2_add_en[b]   = f_ev_v[b];
        l2_add_addr[b] = f_ev_tag[b];
        l2_add_val[b]  = f_ev_val[b];
      end
      l2_rc_en[b] = d_fire && d_bank == 5'(b);
    end
    acc_bank #(.DEPTH(BANK_DEPTH)) u_l2 (
      .clk,
      .add_en (l2_add_en[b]), .add_addr (l2_add_addr[b]), .add_val (l2_add_val[b]),
      .rc_en  (l2_rc_en[b]),  .rc_addr  (d_entry),        .rc_data (l2_rc_data[b]),
      .clr_en (state == S_INIT), .clr_addr (init_cnt)
    );
  end

  // ---------------------------------------------------------------- network out
  psum_t d_val;
  logic  d_last;
  assign d_val  = l2_rc_data[d_bank];
  assign d_last = (dk == 6'(KT-1)) && (dp == 5'(TILE_PIX-1));

  always_comb begin
    out_valid = 1'b0;
    out_flit  = '0;
    out_flit.sx = 3'(X);
    out_flit.sy = 3'(Y);
    out_flit.dy = 3'(Y);
    case (state)
      S_REQ: begin
        out_valid = 1'b1;
        out_flit.kind  = FL_ACTREQ;
        out_flit.to_cb = 1'b1;
        out_flit.addr  = 16'(slice);
      end
      S_GO: begin
        out_valid = 1'b1;
        out_flit.kind = FL_GO;
        out_flit.dx   = 3'(X + 1);
      end
      S_SENDPS: begin
        out_valid = 1'b1;
        out_flit.kind = FL_PSUM;
        out_flit.dx   = 3'(X - 1);
        out_flit.addr = 16'({d_bank, d_entry});
        out_flit.data = 64'(signed'(d_val));
      end
      S_RESULT: begin
        out_valid = (d_val != '0);
        out_flit.kind  = FL_RESULT;
        out_flit.to_cb = 1'b1;
        out_flit.addr  = cfg.out_base + 16'({dk, dp});
        out_flit.data  = 64'(signed'(d_val));
      end
      default: ;
    endcase
    d_fire = (state == S_SENDPS && out_ready) ||
             (state == S_RESULT && (out_ready || d_val == '0));
  end

  assign in_ready = 1'b1;
  assign busy = !(state == S_IDLE || state == S_DONE);
  assign done = (state == S_DONE);

  // ---------------------------------------------------------------- control
  logic comp_last_row;
  assign comp_last_row = (kg == 4'(cfg.n_kg - 5'd1)) && (wpos == cfg.n_wpos - 5'd1);

  function automatic logic [5:0] popcnt16(logic [15:0] v);
    logic [5:0] n;
    n = '0;
    for (int i = 0; i < 16; i++) n += 6'(v[i]);
    return n;
  endfunction

  function automatic logic [6:0] zeros64(logic [63:0] v);
    logic [6:0] n;
    n = '0;
    for (int i = 0; i < 64; i++) n += 7'(!v[i]);
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT;
      cfg <= '0;
      init_cnt <= '0;
      ld_cnt <= '0;
      slice <= '0; row <= '0; kg <= '0; wpos <= '0; ch <= '0;
      row_start <= 1'b0;
      go_flag <= 1'b0;
      ps_cnt <= '0;
      dk <= '0; dp <= '0;
      op_valid <= 1'b0; op_grp <= '0; op_wts <= '0; op_kg <= '0;
      done_mask <= '0; op_first <= 1'b0;
      st_hits <= '0; st_misses <= '0; st_products <= '0; st_conflict_stalls <= '0;
      st_skipped_ch <= '0; st_oot <= '0; st_cycles <= '0;
    end else begin
      if (ld_en && ld_is_cfg) cfg <= pe_cfg_t'(ld_data[$bits(pe_cfg_t)-1:0]);
      if (in_valid && in_flit.kind == FL_GO) go_flag <= 1'b1;
      if (busy) st_cycles <= st_cycles + 1;

      // execute stage bookkeeping
      if (op_valid) begin
        st_hits     <= st_hits + 32'(popcnt16(16'(f_hit)) + popcnt16(16'(f_hit >> 16)));
        st_misses   <= st_misses + 32'(popcnt16(16'(f_miss)) + popcnt16(16'(f_miss >> 16)));
        st_products <= st_products + 32'(popcnt16(grant));
        if (op_first) st_oot <= st_oot + 32'(popcnt16(ig_oot));
        if (stall) st_conflict_stalls <= st_conflict_stalls + 1;
      end
      if (stall) begin
        done_mask <= done_mask | grant;
        op_first  <= 1'b0;
      end else if (issue) begin
        op_valid  <= 1'b1;
        op_grp    <= ab_rd;
        op_wts    <= wb_rd;
        op_kg     <= kg;
        done_mask <= '0;
        op_first  <= 1'b1;
      end else begin
        op_valid  <= 1'b0;
      end

      case (state)
        S_INIT: begin
          init_cnt <= init_cnt + 1'b1;
          if (init_cnt == 6'(BANK_DEPTH-1)) state <= S_IDLE;
        end
        S_IDLE, S_DONE: if (start) begin
          state <= S_REQ;
          slice <= '0;
          go_flag <= 1'b0;
          st_hits <= '0; st_misses <= '0; st_products <= '0; st_conflict_stalls <= '0;
          st_skipped_ch <= '0; st_oot <= '0; st_cycles <= '0;
        end
        S_REQ: if (out_ready) begin
          state  <= S_LOAD;
          ld_cnt <= '0;
        end
        S_LOAD: if (ab_wr) begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == 7'(CT-1)) begin
            state <= S_COMP;
            row <= '0; kg <= '0; wpos <= '0; ch <= '0;
            row_start <= 1'b1;
          end
        end
        S_COMP: begin
          if (row_start) begin
            st_skipped_ch <= st_skipped_ch + 32'(zeros64(ch_mask));
            row_start <= 1'b0;
          end
          if (issue) ch <= 7'(next_ch) + 7'd1;
          else if (!found && !stall) begin
            // row finished
            ch <= '0;
            row_start <= 1'b1;
            if (comp_last_row) begin
              if (5'(slice) + 5'd1 == 5'(cfg.n_slices)) state <= S_FLUSH;
              else begin
                slice <= slice + 1'b1;
                state <= S_REQ;
              end
            end else begin
              row <= row + 1'b1;
              if (kg == 4'(cfg.n_kg - 5'd1)) begin
                kg <= '0;
                wpos <= wpos + 1'b1;
              end else kg <= kg + 1'b1;
            end
          end
        end
        S_FLUSH: if (!op_valid && &f_empty) begin
          dk <= '0; dp <= '0;
          ps_cnt <= '0;
          case (cfg.role)
            ROLE_RECV: state <= S_GO;
            ROLE_SEND: state <= S_WAITGO;
            default:   state <= S_RESULT;
          endcase
        end
        S_GO: if (out_ready) state <= S_WAITRED;
        S_WAITRED: if (rx_psum) begin
          ps_cnt <= ps_cnt + 1'b1;
          if (ps_cnt == 11'(NPS-1)) state <= S_RESULT;
        end
        S_WAITGO: if (go_flag) begin
          go_flag <= 1'b0;
          state <= S_SENDPS;
        end
        S_SENDPS, S_RESULT: if (d_fire) begin
          if (d_last) begin
            state <= S_DONE;
            dk <= '0; dp <= '0;
          end else if (dp == 5'(TILE_PIX-1)) begin
            dp <= '0;
            dk <= dk + 1'b1;
          end else dp <= dp + 1'b1;
        end
        default: ;
      endcase
    end
  end

  // A PE never receives a partial sum or activation it did not ask for.
  a_no_stray_psum: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_flit.kind == FL_PSUM |-> state == S_WAITRED);
  a_no_stray_act: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_flit.kind == FL_ACT |-> state == S_LOAD);
endmodule
