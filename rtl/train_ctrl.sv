// train_ctrl: sequencer of the NT training slots. A slot trains one agent's
// rollout: it starts the slot's loss-gradient engine (LGCU), then for every
// recorded step t and every layer l = 3..0 walks the layer's weights in
// LANES-wide input chunks jc and, inside each chunk, over all output neurons
// k, issuing one (k, jc) pair per cycle to the slot's backward engine (BCU)
// and gradient engine (PGCU):
//   gradient x'_k  from the back-propagation buffer (output-layer gradients
//                  of step t for l = 3, otherwise the bank the layer above
//                  wrote),
//   sign bit A'_k  from the sign store (forced to 1 for the linear output
//                  layer),
//   weights        w[l][k][jc*LANES..] for the backward engine,
//   inputs         x_l[jc*LANES..] of step t for the gradient engine.
// When the backward engine completes a chunk, the LANES input gradients are
// written to the other bank of the back-propagation buffer (not for l = 0).
// One idle cycle separates layers so the last chunk is written before the
// next layer reads it. Gradients of all steps flow into the RMSProp unit's
// buffer for the agent; at the end the slot offers the agent number on
// fin_valid until fin_ready.
// Cycles per step: sum over layers of out*in/LANES + 4.
module train_ctrl
  import a3c_pkg::*;
#(
  parameter int NT    = 6,
  parameter int AGW   = 3,
  parameter int LANES = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // jobs
  input  logic            start    [NT],
  input  logic [AGW-1:0]  start_agent [NT],
  input  logic [2:0]      start_nsteps [NT],
  input  logic            start_term [NT],
  output logic            busy     [NT],
  // LGCU
  output logic            lg_start [NT],
  output logic [AGW-1:0]  lg_agent [NT],
  output logic [2:0]      lg_nsteps [NT],
  output logic            lg_term  [NT],
  input  logic            lg_done  [NT],
  // memory
  output logic [AGW-1:0]  t_agent   [NT],
  output paddr_t          t_w_addr  [NT],
  output aaddr_t          t_x_addr  [NT],
  output saddr_t          t_s_addr  [NT],
  input  logic            t_sbit    [NT],
  output logic            t_g_out   [NT],
  output logic [2:0]      t_g_step  [NT],
  output logic            t_g_bank  [NT],
  output logic [8:0]      t_g_idx   [NT],
  output logic            t_gb_we   [NT],
  output logic            t_gb_bank [NT],
  output logic [8:0]      t_gb_idx  [NT],
  // engines
  output logic            e_valid  [NT],
  output logic            e_clear  [NT],
  output logic            e_last   [NT],
  output logic            e_sel    [NT],
  output logic            e_b_en   [NT],
  output paddr_t          e_w_addr [NT],
  output paddr_t          e_b_addr [NT],
  input  logic            bpe_done [NT],
  // completion
  output logic            fin_valid [NT],
  output logic [AGW-1:0]  fin_agent [NT],
  input  logic            fin_ready [NT]
);
  typedef enum logic [2:0] {T_IDLE, T_LOSS, T_RUN, T_DRAIN, T_FIN} tstate_t;

  for (genvar s = 0; s < NT; s++) begin : g_slot
    tstate_t        st;
    logic [AGW-1:0] agent;
    logic [2:0]     nsteps, t;
    logic [1:0]     l, wb_l;
    logic [8:0]     k;
    logic [5:0]     jc, wb_jc;
    int             n_in, n_out;

    always_comb begin
      n_in  = layer_in(int'(l));
      n_out = layer_out(int'(l));
    end

    assign busy[s]      = (st != T_IDLE);
    assign lg_agent[s]  = start_agent[s];
    assign lg_nsteps[s] = start_nsteps[s];
    assign lg_term[s]   = start_term[s];
    assign lg_start[s]  = (st == T_IDLE) && start[s];
    assign t_agent[s]   = agent;
    assign fin_valid[s] = (st == T_FIN);
    assign fin_agent[s] = agent;

    always_comb begin
      t_w_addr[s]  = paddr_t'(w_base(int'(l)) + int'(k) * n_in + int'(jc) * LANES);
      t_x_addr[s]  = aaddr_t'(int'(t) * ACT_WORDS + act_base(int'(l)) + int'(jc) * LANES);
      t_s_addr[s]  = saddr_t'(int'(t) * SGN_BITS + sgn_base(int'(l)) + int'(k));
      t_g_out[s]   = (l == 2'd3);
      t_g_step[s]  = t;
      t_g_bank[s]  = l[0];
      t_g_idx[s]   = k;
      e_valid[s]   = (st == T_RUN);
      e_clear[s]   = (k == 9'd0);
      e_last[s]    = (int'(k) == n_out - 1);
      e_sel[s]     = (l == 2'd3) ? 1'b1 : t_sbit[s];
      e_b_en[s]    = (jc == 6'd0);
      e_w_addr[s]  = t_w_addr[s];
      e_b_addr[s]  = paddr_t'(b_base(int'(l)) + int'(k));
      // the completed chunk of input gradients goes to the lower layer's bank
      t_gb_we[s]   = bpe_done[s] && (wb_l != 2'd0);
      t_gb_bank[s] = ~wb_l[0];
      t_gb_idx[s]  = 9'(int'(wb_jc) * LANES);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st     <= T_IDLE;
        agent  <= '0;
        nsteps <= '0;
        t      <= '0;
        l      <= '0;
        k      <= '0;
        jc     <= '0;
        wb_l   <= '0;
        wb_jc  <= '0;
      end else begin
        case (st)
          T_IDLE: if (start[s]) begin
            agent  <= start_agent[s];
            nsteps <= start_nsteps[s];
            st     <= T_LOSS;
          end
          T_LOSS: if (lg_done[s]) begin
            t  <= '0;
            l  <= 2'd3;
            k  <= '0;
            jc <= '0;
            st <= T_RUN;
          end
          T_RUN: begin
            if (int'(k) == n_out - 1) begin
              k     <= '0;
              wb_l  <= l;
              wb_jc <= jc;
              if (int'(jc) == n_in / LANES - 1) begin
                jc <= '0;
                st <= T_DRAIN;
              end else jc <= jc + 6'd1;
            end else k <= k + 9'd1;
          end
          T_DRAIN: begin
            if (l == 2'd0) begin
              l <= 2'd3;
              if (t == nsteps - 3'd1) st <= T_FIN;
              else begin
                t  <= t + 3'd1;
                st <= T_RUN;
              end
            end else begin
              l  <= l - 2'd1;
              st <= T_RUN;
            end
          end
          T_FIN: if (fin_ready[s]) st <= T_IDLE;
          default: st <= T_IDLE;
        endcase
      end
    end
  end
endmodule
