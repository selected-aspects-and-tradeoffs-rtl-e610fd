// float_crossover: Floating-point Crossover Module (FCM).
// Computes two IEEE-754 single-precision children from parents A and B with
// one shared multiplier (fp_mul) and one shared adder (fp_add), one operation
// per clock, under a small sequencer:
//   AR_EXCHANGE: C/D = A/B or B/A by 'cross_bit'                          1 cycle
//   AR_MEAN:     C = D = (A+B)*0.5 (exponent decrement)     eq. (1)   1 cycle
//   AR_BLEND:    C = a*A+(1-a)*B, D = a*B+(1-a)*A           eq. (2)   6 cycles
//   AR_DIFF:     C = a*(B-A)+A,   D = a*(A-B)+B             eq. (3)   5 cycles
// alpha is a Q0.16 fraction, converted exactly to float together with 1-alpha.
// Handshake: operands are taken when in_valid && in_ready (in_ready = idle);
// the result stays on c/d with out_valid high until out_ready. The slower rate
// of the float genes, set by the multiplications, follows the original design;
// the single shared adder and multiplier and the operation order are this
// design's choice.
module float_crossover
  import ga_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  arith_algo_e        algo,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [31:0]        a,
  input  logic [31:0]        b,
  input  logic               cross_bit,
  input  logic [RAND_W-1:0]  alpha,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [31:0]        c,
  output logic [31:0]        d
);
  // Q0.16 (or 1.0 = 65536) to float, exact
  function automatic logic [31:0] fix2flt(logic [16:0] v);
    int p;
    logic [31:0] r;
    logic [39:0] sv;
    p = -1;
    for (int i = 0; i < 17; i++) if (v[i]) p = i;
    if (p < 0) r = 32'd0;
    else begin
      sv = 40'(v) << (23 - p);
      r  = {1'b0, 8'(127 + p - 16), sv[22:0]};
    end
    return r;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e       state;
  arith_algo_e  op;
  logic [2:0]   step;
  logic [31:0]  ra, rb, fa, fb, t0, t1;
  logic [31:0]  mx, my, mp, ax, ay, as;

  fp_mul u_mul (.a(mx), .b(my), .y(mp));
  fp_add u_add (.a(ax), .b(ay), .y(as));

  // operand routing per step
  always_comb begin
    mx = fa; my = ra; ax = ra; ay = rb;
    unique case (op)
      AR_BLEND: unique case (step)
        3'd0:    begin mx = fa; my = ra; end          // t0 = a*A
        3'd1:    begin mx = fb; my = rb; end          // t1 = (1-a)*B
        3'd2:    begin ax = t0; ay = t1; end          // C
        3'd3:    begin mx = fa; my = rb; end          // t0 = a*B
        3'd4:    begin mx = fb; my = ra; end          // t1 = (1-a)*A
        default: begin ax = t0; ay = t1; end          // D
      endcase
      AR_DIFF: unique case (step)
        3'd0:    begin ax = rb; ay = {~ra[31], ra[30:0]}; end  // t0 = B-A
        3'd1:    begin mx = fa; my = t0; end                   // t1 = a*(B-A)
        3'd2:    begin ax = t1; ay = ra; end                   // C
        3'd3:    begin mx = fa; my = {~t0[31], t0[30:0]}; end  // t1 = a*(A-B)
        default: begin ax = t1; ay = rb; end                   // D
      endcase
      default: begin ax = ra; ay = rb; end
    endcase
  end

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; op <= AR_EXCHANGE; step <= '0;
      ra <= '0; rb <= '0; fa <= '0; fb <= '0; t0 <= '0; t1 <= '0; c <= '0; d <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          ra    <= a;
          rb    <= b;
          fa    <= fix2flt(17'(alpha));
          fb    <= fix2flt(17'd65536 - 17'(alpha));
          op    <= algo;
          step  <= '0;
          if (algo == AR_EXCHANGE) begin
            c     <= cross_bit ? b : a;
            d     <= cross_bit ? a : b;
            state <= S_DONE;
          end else begin
            state <= S_RUN;
          end
        end
        S_RUN: begin
          step <= step + 1'b1;
          unique case (op)
            AR_MEAN: begin
              // halve: decrement the exponent unless zero or subnormal result
              if (as[30:23] > 8'd1) begin
                c <= {as[31], as[30:23] - 8'd1, as[22:0]};
                d <= {as[31], as[30:23] - 8'd1, as[22:0]};
              end else begin
                c <= {as[31], 31'b0};
                d <= {as[31], 31'b0};
              end
              state <= S_DONE;
            end
            AR_BLEND: unique case (step)
              3'd0, 3'd3: t0 <= mp;
              3'd1, 3'd4: t1 <= mp;
              3'd2:       c  <= as;
              default: begin d <= as; state <= S_DONE; end
            endcase
            default: unique case (step)   // AR_DIFF
              3'd0:       t0 <= as;
              3'd1, 3'd3: t1 <= mp;
              3'd2:       c  <= as;
              default: begin d <= as; state <= S_DONE; end
            endcase
          endcase
        end
        default: if (out_ready) state <= S_IDLE;
      endcase
    end
  end
endmodule
