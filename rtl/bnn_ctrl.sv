// Loop sequencer of the binarized convolution layer.
//
// The controller runs the convolution's loop nest in the order the array
// needs it. Loop-4 (output channels) is split into groups of Q kernels; for
// each group it first loads the group's Q kernels from external memory into
// the on-chip buffer, then sweeps all output tiles (Loop-3, tiles_x by
// tiles_y tiles of X x Y pixels). Within a tile it walks Loop-2 in slices of
// d channels, and for each slice issues the Q kernels on Q consecutive
// cycles: W0/slice 0, W1/slice 0, ..., W0/slice 1, ... . A new input slice is
// taken from external memory only on the first of those Q cycles; the other
// Q-1 cycles reuse it, so input data is read once per group instead of once
// per kernel. The loop order and the kernel interleaving follow the
// architecture; the handshakes, the tile walk order (x inner) and the
// one-cycle gap after each kernel load are this design's choices.
//
// Handshakes (valid/ready, transfer when both high):
//   kernel load  kw_ready is high in the load phase; kw_kernel/kw_d name the
//                kernel (absolute Loop-4 index) and slice wanted next; the
//                word goes straight into the buffer at ocb_waddr.
//   input slice  in_ready is high when a new slice is needed; in_tx/in_ty/
//                in_d name it. If in_valid is low the array gets an empty
//                cycle (a bubble, flagged on stall) and the request stays.
// To the array: feed_tag and feed_ld_win are combinational; the kernel slice
// comes from the buffer read started one cycle earlier (ocb_raddr always
// points at the next slice to issue). done pulses once the last results
// have left the array, X+2 cycles after the last issue.
module bnn_ctrl
  import bnn_pkg::*;
#(
  parameter  int unsigned X   = 4,
  parameter  int unsigned Q   = 4,
  parameter  int unsigned NS  = 22,   // Loop-2 slices per kernel
  localparam int unsigned DEPTH = Q * NS,
  localparam int unsigned AW  = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned QW  = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned SW  = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control and layer shape
  input  logic              start,
  input  logic [15:0]       cfg_groups,    // Loop-4 iterations / Q
  input  logic [15:0]       cfg_tiles_x,
  input  logic [15:0]       cfg_tiles_y,
  output logic              busy,
  output logic              done,
  // kernel load from external memory
  output logic              kw_ready,
  input  logic              kw_valid,
  output logic [15:0]       kw_kernel,
  output logic [SW-1:0]     kw_d,
  // input slice from external memory
  output logic              in_ready,
  input  logic              in_valid,
  output logic [15:0]       in_tx,
  output logic [15:0]       in_ty,
  output logic [SW-1:0]     in_d,
  output logic              stall,
  // on-chip buffer
  output logic              ocb_we,
  output logic [AW-1:0]     ocb_waddr,
  output logic [AW-1:0]     ocb_raddr,
  // array feed
  output ktag_t             feed_tag,
  output logic              feed_ld_win
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_PRIME, S_RUN, S_DRAIN} state_t;

  state_t        state;
  logic [15:0]   groups, tiles_x, tiles_y;
  logic [15:0]   g;
  logic [QW-1:0] lq, q;
  logic [SW-1:0] ld, d;
  logic [15:0]   tx, ty;
  logic [7:0]    drain;

  // Next position of the run counters after one issue.
  logic [QW-1:0] q_n;
  logic [SW-1:0] d_n;
  logic [15:0]   tx_n, ty_n;
  logic          last_q, last_d, last_tx, last_ty, fire, load_fire;

  assign last_q  = (q  == QW'(Q - 1));
  assign last_d  = (d  == SW'(NS - 1));
  assign last_tx = (tx == tiles_x - 16'd1);
  assign last_ty = (ty == tiles_y - 16'd1);

  always_comb begin
    q_n  = q;  d_n = d;  tx_n = tx;  ty_n = ty;
    if (!last_q) q_n = q + QW'(1);
    else begin
      q_n = '0;
      if (!last_d) d_n = d + SW'(1);
      else begin
        d_n = '0;
        if (!last_tx) tx_n = tx + 16'd1;
        else begin
          tx_n = '0;
          ty_n = last_ty ? 16'd0 : ty + 16'd1;
        end
      end
    end
  end

  assign in_ready  = (state == S_RUN) && (q == '0);
  assign fire      = (state == S_RUN) && ((q != '0) || in_valid);
  assign stall     = in_ready && !in_valid;
  assign kw_ready  = (state == S_LOAD);
  assign load_fire = kw_ready && kw_valid;

  assign busy      = (state != S_IDLE);
  assign kw_kernel = 16'(g * Q) + 16'(lq);
  assign kw_d      = ld;
  assign in_tx     = tx;
  assign in_ty     = ty;
  assign in_d      = d;

  assign ocb_we    = load_fire;
  assign ocb_waddr = AW'(lq) * AW'(NS) + AW'(ld);
  assign ocb_raddr = fire ? AW'(q_n) * AW'(NS) + AW'(d_n) : AW'(q) * AW'(NS) + AW'(d);

  always_comb begin
    feed_tag       = '0;
    feed_tag.valid = fire;
    feed_tag.q     = QIDX_W'(q);
    feed_tag.first = (d == '0);
    feed_tag.last  = last_d;
    feed_ld_win    = fire && (q == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      groups  <= '0;
      tiles_x <= '0;
      tiles_y <= '0;
      g       <= '0;
      lq      <= '0;
      ld      <= '0;
      q       <= '0;
      d       <= '0;
      tx      <= '0;
      ty      <= '0;
      drain   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start && cfg_groups != 0 && cfg_tiles_x != 0 && cfg_tiles_y != 0) begin
          groups  <= cfg_groups;
          tiles_x <= cfg_tiles_x;
          tiles_y <= cfg_tiles_y;
          g       <= '0;
          lq      <= '0;
          ld      <= '0;
          state   <= S_LOAD;
        end
        S_LOAD: if (load_fire) begin
          if (ld != SW'(NS - 1)) ld <= ld + SW'(1);
          else begin
            ld <= '0;
            if (lq != QW'(Q - 1)) lq <= lq + QW'(1);
            else begin
              lq    <= '0;
              state <= S_PRIME;
            end
          end
        end
        S_PRIME: begin
          q     <= '0;
          d     <= '0;
          tx    <= '0;
          ty    <= '0;
          state <= S_RUN;
        end
        S_RUN: if (fire) begin
          q  <= q_n;
          d  <= d_n;
          tx <= tx_n;
          ty <= ty_n;
          if (last_q && last_d && last_tx && last_ty) begin
            if (g == groups - 16'd1) begin
              drain <= 8'(X + 1);
              state <= S_DRAIN;
            end else begin
              g     <= g + 16'd1;
              state <= S_LOAD;
            end
          end
        end
        S_DRAIN: begin
          if (drain == 0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else drain <= drain - 8'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A transfer request holds its address until it is accepted.
  a_in_hold : assert property (@(posedge clk) disable iff (!rst_n)
      (in_ready && !in_valid) |=> (in_ready && $stable(in_tx) && $stable(in_ty) && $stable(in_d)));
  a_kw_hold : assert property (@(posedge clk) disable iff (!rst_n)
      (kw_ready && !kw_valid) |=> (kw_ready && $stable(kw_kernel) && $stable(kw_d)));

endmodule
