// isodata_unit: ISODATA (Ridler-Calvard) threshold compute unit.
//
// Given a finished histogram h in a dual-port memory, it finds the threshold T
// with floor((mean of levels 0..T + mean of levels T+1..255) / 2) == T.
//
// Datapath (the document's): a threshold register; a down-counter loaded with T
// that addresses memory port A and scans class C1 (levels T..0); an up-counter
// loaded with T+1 that addresses port B and scans class C2 (levels T+1..255).
// Both classes are scanned at the same time, one level per class per clock.
// Per class, a MAC accumulates h(g)*g and an accumulating adder accumulates
// h(g). Two combinational dividers give the class means, an add-and-shift
// gives their average, and a comparator checks it against T. If it differs it
// is loaded into the threshold register and the scan repeats; otherwise `done`.
//
// Initial threshold: the overall mean of the histogram. It is found with the
// same datapath by one pass with T = top level, which puts every level in
// class C1 (this reuse is this design's). If a class is empty in an iteration
// (or the whole histogram is empty), the run ends with `error` high instead.
//
// Timing: a pulse on `start` begins a run. Each pass takes
// max(T+1, LEVELS-1-T) + 4 clocks: load, scan, one clock for the last memory
// read, evaluate, decide. `iterations` counts passes after the initial one.
// `threshold` holds the result when `done` rises and stays valid until the
// next start. The memory read latency must be one clock.
module isodata_unit
  import isodata_pkg::*;
#(
  parameter int unsigned PIX_W_P = PIX_W,
  parameter int unsigned BIN_W_P = BIN_W,
  parameter int unsigned SUM_W_P = SUM_W,
  parameter int unsigned MOM_W_P = MOM_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic               error,
  output logic [PIX_W_P-1:0] threshold,
  output logic [7:0]         iterations,
  // histogram memory, read only
  output logic [PIX_W_P-1:0] c1_addr,
  input  logic [BIN_W_P-1:0] c1_data,
  output logic [PIX_W_P-1:0] c2_addr,
  input  logic [BIN_W_P-1:0] c2_data
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_SCAN, S_WAIT, S_EVAL, S_NEXT
  } state_e;

  state_e state;
  logic   first_pass;   // initial pass computing the overall mean

  // threshold register and incrementer
  logic               thr_load;
  logic [PIX_W_P-1:0] thr_d, thr_q, thr_p1;
  logic               thr_max;

  threshold_register #(.W(PIX_W_P)) u_thr (
    .clk, .rst_n, .load(thr_load), .d(thr_d),
    .q(thr_q), .q_plus1(thr_p1), .is_max(thr_max)
  );

  // class scan counters
  logic               cnt_load, dn_en, up_en, dn_last, up_last;
  logic [PIX_W_P-1:0] dn_cnt, up_cnt;
  logic               dn_act, up_act;     // counter still has levels to read

  level_counter #(.W(PIX_W_P), .UP(1'b0)) u_count_down (
    .clk, .rst_n, .load(cnt_load), .load_val(thr_q), .en(dn_en),
    .count(dn_cnt), .last(dn_last)
  );

  level_counter #(.W(PIX_W_P), .UP(1'b1)) u_count_up (
    .clk, .rst_n, .load(cnt_load), .load_val(thr_p1), .en(up_en),
    .count(up_cnt), .last(up_last)
  );

  assign c1_addr = dn_cnt;
  assign c2_addr = up_cnt;

  // read data qualifiers, one clock behind the address
  logic               c1_rv, c2_rv;
  logic [PIX_W_P-1:0] c1_lvl, c2_lvl;

  // class accumulators
  logic               acc_clr;
  logic [MOM_W_P-1:0] mom1, mom2;
  logic [SUM_W_P-1:0] pop1, pop2;

  mac_unit #(.A_W(BIN_W_P), .B_W(PIX_W_P), .ACC_W(MOM_W_P)) u_mac_c1 (
    .clk, .rst_n, .clr(acc_clr), .en(c1_rv), .count(c1_data), .level(c1_lvl), .acc(mom1)
  );
  mac_unit #(.A_W(BIN_W_P), .B_W(PIX_W_P), .ACC_W(MOM_W_P)) u_mac_c2 (
    .clk, .rst_n, .clr(acc_clr), .en(c2_rv), .count(c2_data), .level(c2_lvl), .acc(mom2)
  );
  sum_acc #(.A_W(BIN_W_P), .ACC_W(SUM_W_P)) u_sum_c1 (
    .clk, .rst_n, .clr(acc_clr), .en(c1_rv), .count(c1_data), .acc(pop1)
  );
  sum_acc #(.A_W(BIN_W_P), .ACC_W(SUM_W_P)) u_sum_c2 (
    .clk, .rst_n, .clr(acc_clr), .en(c2_rv), .count(c2_data), .acc(pop2)
  );

  // class means, their average, and the convergence comparator
  logic [PIX_W_P-1:0] mean1, mean2, t_avg, t_new;
  logic               cmp_en, cmp_equal, cmp_done;

  class_mean_div #(.NUM_W(MOM_W_P), .DEN_W(SUM_W_P), .Q_W(PIX_W_P)) u_mean_c1 (
    .moment(mom1), .population(pop1), .mean(mean1)
  );
  class_mean_div #(.NUM_W(MOM_W_P), .DEN_W(SUM_W_P), .Q_W(PIX_W_P)) u_mean_c2 (
    .moment(mom2), .population(pop2), .mean(mean2)
  );
  mean_average #(.W(PIX_W_P)) u_avg (.mean1, .mean2, .avg(t_avg));

  assign t_new = first_pass ? mean1 : t_avg;

  threshold_comparator #(.W(PIX_W_P)) u_cmp (
    .clk, .rst_n, .clr(start && !busy), .en(cmp_en),
    .t_new, .t_old(thr_q), .equal(cmp_equal), .done(cmp_done)
  );

  logic empty_class;
  assign empty_class = (pop1 == '0) || (!first_pass && pop2 == '0);

  // control
  always_comb begin
    thr_load = 1'b0;
    thr_d    = t_new;
    cnt_load = 1'b0;
    acc_clr  = 1'b0;
    cmp_en   = 1'b0;
    dn_en    = 1'b0;
    up_en    = 1'b0;
    unique case (state)
      S_IDLE: if (start) begin
        thr_load = 1'b1;
        thr_d    = '1;          // all levels in class C1: overall mean pass
      end
      S_LOAD: begin
        cnt_load = 1'b1;
        acc_clr  = 1'b1;
      end
      S_SCAN: begin
        dn_en = dn_act && !dn_last;
        up_en = up_act && !up_last;
      end
      S_EVAL: if (!empty_class) begin
        cmp_en   = !first_pass;
        thr_load = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      first_pass <= 1'b0;
      dn_act     <= 1'b0;
      up_act     <= 1'b0;
      c1_rv      <= 1'b0;
      c2_rv      <= 1'b0;
      c1_lvl     <= '0;
      c2_lvl     <= '0;
      done       <= 1'b0;
      error      <= 1'b0;
      iterations <= '0;
    end else begin
      c1_rv  <= (state == S_SCAN) && dn_act;
      c2_rv  <= (state == S_SCAN) && up_act;
      c1_lvl <= dn_cnt;
      c2_lvl <= up_cnt;
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_LOAD;
          first_pass <= 1'b1;
          done       <= 1'b0;
          error      <= 1'b0;
          iterations <= '0;
        end
        S_LOAD: begin
          state  <= S_SCAN;
          dn_act <= 1'b1;
          up_act <= !thr_max;
        end
        S_SCAN: begin
          if (dn_last) dn_act <= 1'b0;
          if (up_last) up_act <= 1'b0;
          if ((dn_last || !dn_act) && (up_last || !up_act)) state <= S_WAIT;
        end
        S_WAIT: state <= S_EVAL;
        S_EVAL: begin
          if (empty_class) begin
            error <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_NEXT;
            if (!first_pass) iterations <= iterations + 1'b1;
          end
        end
        S_NEXT: begin
          first_pass <= 1'b0;
          if (!first_pass && cmp_done) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign threshold = thr_q;

endmodule
