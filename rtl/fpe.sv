// fpe: forward processing engine. Runs one complete forward inference of the
// agent network for one agent and one time step.
//
// Datapath: a Multiplier-AddTree module (LANES products per cycle plus bias /
// running-sum add), a ReLU module for the shared hidden layers and a Softmax
// module for the actor output; the critic output (row 4 of the last layer) is
// linear. A sequencer walks layer by layer, output neuron by output neuron and
// LANES-wide input chunk by chunk, reading weights from the central parameter
// memory (p_addr/p_data, combinational read) and inputs from the agent's
// activation buffer (a_raddr/a_rdata). Each finished hidden neuron is written
// back to the activation buffer (a_we) and its ReLU sign is written to the
// sign buffer (s_we), where the backward and gradient engines find it.
// After the last layer the four policy probabilities and the value are
// written to the buffer and presented on pi/v with done_valid, held until
// done_ready.
// Timing: one chunk per cycle, one idle cycle per layer, two cycles of
// softmax and one cycle per stored probability: done_valid rises
// sum over layers of out*(in/LANES) + 4 + 2 + 4 = 9266 cycles (LANES = 8)
// after the clock edge that accepts start.
// The Multiplier-AddTree's y_valid output is not used (lint lists it): the sequencer
// knows in which cycle each neuron's sum is complete.
// The engine structure follows the accelerator; the sequencing, the memory
// map and the handshake are this design's choices.
module fpe
  import a3c_pkg::*;
#(
  parameter int LANES = 8,
  parameter int AGW   = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  // job
  input  logic            start,
  input  logic [AGW-1:0]  start_agent,
  input  logic [2:0]      start_step,
  output logic            busy,
  output logic [AGW-1:0]  agent,
  output logic [2:0]      step,
  // parameter memory read
  output paddr_t          p_addr,
  input  fp32_t           p_data [LANES],
  output paddr_t          b_addr,
  input  fp32_t           b_data,
  // activation buffer of 'agent'
  output aaddr_t          a_raddr,
  input  fp32_t           a_rdata [LANES],
  output logic            a_we,
  output aaddr_t          a_waddr,
  output fp32_t           a_wdata,
  // sign buffer of 'agent'
  output logic            s_we,
  output saddr_t          s_waddr,
  output fp32_t           s_wdata,
  // result
  output logic            done_valid,
  input  logic            done_ready,
  output fp32_t           pi [NUM_ACT],
  output fp32_t           v
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_SMAX, S_SWAIT, S_WPI, S_DONE} state_t;
  state_t state;

  logic [1:0] l, lq;
  logic [8:0] k, kq;
  logic [5:0] c;
  logic       last_q;
  logic [2:0] wi;
  fp32_t      logit [NUM_ACT];

  int n_in, n_out, n_chunks;
  always_comb begin
    n_in     = layer_in(int'(l));
    n_out    = layer_out(int'(l));
    n_chunks = n_in / LANES;
  end

  // datapath
  logic  mac_valid, y_valid;
  fp32_t y, relu_y;
  logic  sm_valid;
  fp32_t sm_pi [NUM_ACT];

  assign mac_valid = (state == S_RUN);

  mult_addtree #(.LANES(LANES)) u_mat (
    .clk, .rst_n, .valid(mac_valid), .first(c == 6'd0),
    .x(a_rdata), .w(p_data), .b(b_data), .acc_in(y),
    .y, .y_valid
  );

  relu_unit u_relu (.x(y), .y(relu_y));

  softmax_unit #(.N(NUM_ACT)) u_smax (
    .clk, .rst_n, .valid(state == S_SMAX), .x(logit), .pi(sm_pi), .pi_valid(sm_valid)
  );

  int step_base;
  always_comb begin
    step_base = int'(step) * ACT_WORDS;
    p_addr  = paddr_t'(w_base(int'(l)) + int'(k) * n_in + int'(c) * LANES);
    b_addr  = paddr_t'(b_base(int'(l)) + int'(k));
    a_raddr = aaddr_t'(step_base + act_base(int'(l)) + int'(c) * LANES);
    a_we    = 1'b0;
    a_waddr = '0;
    a_wdata = FP_ZERO;
    s_we    = 1'b0;
    s_waddr = saddr_t'(int'(step) * SGN_BITS + sgn_base(int'(lq)) + int'(kq));
    s_wdata = relu_y;
    if (last_q) begin
      a_we    = 1'b1;
      a_waddr = aaddr_t'(step_base + act_base(int'(lq) + 1) + int'(kq));
      a_wdata = (lq == 2'd3) ? y : relu_y;
      s_we    = (lq != 2'd3);
    end else if (state == S_WPI) begin
      a_we    = 1'b1;
      a_waddr = aaddr_t'(step_base + act_base(4) + int'(wi));
      a_wdata = pi[wi[1:0]];
    end
  end

  assign busy       = (state != S_IDLE);
  assign done_valid = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      l      <= '0;
      k      <= '0;
      c      <= '0;
      lq     <= '0;
      kq     <= '0;
      last_q <= 1'b0;
      wi     <= '0;
      agent  <= '0;
      step   <= '0;
      v      <= FP_ZERO;
      for (int i = 0; i < NUM_ACT; i++) begin
        logit[i] <= FP_ZERO;
        pi[i]    <= FP_ZERO;
      end
    end else begin
      last_q <= 1'b0;
      if (last_q && lq == 2'd3) begin
        if (kq < 9'(NUM_ACT)) logit[kq[1:0]] <= y;
        else                  v <= y;
      end
      case (state)
        S_IDLE: if (start) begin
          agent <= start_agent;
          step  <= start_step;
          l     <= '0;
          k     <= '0;
          c     <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (int'(c) == n_chunks - 1) begin
            c      <= '0;
            last_q <= 1'b1;
            lq     <= l;
            kq     <= k;
            if (int'(k) == n_out - 1) begin
              k     <= '0;
              state <= S_DRAIN;
            end else k <= k + 9'd1;
          end else c <= c + 6'd1;
        end
        S_DRAIN: begin
          if (l == 2'd3) state <= S_SMAX;
          else begin
            l     <= l + 2'd1;
            state <= S_RUN;
          end
        end
        S_SMAX: state <= S_SWAIT;
        S_SWAIT: if (sm_valid) begin
          pi    <= sm_pi;
          wi    <= '0;
          state <= S_WPI;
        end
        S_WPI: begin
          if (wi == 3'(NUM_ACT - 1)) state <= S_DONE;
          wi <= wi + 3'd1;
        end
        S_DONE: if (done_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
