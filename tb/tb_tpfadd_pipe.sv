// tb_tpfadd_pipe: the five-stage pipelined triple path adder. A random stream of
// additions and subtractions, with bubbles in in_valid, mixes operands for
// every path: nearby exponents with cancellation (LZA), distant exponents and
// additions (LZB), special operands and huge exponent gaps (bypass), plus
// overflow and underflow cases. Each result is compared with the
// real-number reference and must come out on the sixth rising edge counting
// the one that sampled the operands; the path state must equal the path of
// the operation one edge after it was sampled. Every state, every path-to-
// path transition and the overflow, underflow, invalid and inexact flags
// must occur at least once.
module tb_tpfadd_pipe;
  import fp_ref_pkg::*;
  import fp_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, in_valid = 0, sub = 0, out_valid;
  logic [31:0] a = 0, b = 0, result;
  fp_flags_t   flags;
  tdp_path_t   state;
  int          cyc = 0;

  typedef struct {
    logic [31:0] res;
    logic [4:0]  flg;
    tdp_path_t   path;
    int          due;
  } exp_t;
  exp_t q_out[$];
  exp_t q_state[$];
  int   state_seen [3];
  int   trans_seen [3][3];
  int   n_ovf = 0, n_unf = 0, n_inv = 0, n_inx = 0;
  tdp_path_t last_state;

  tpfadd_pipe dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .sub(sub),
               .out_valid(out_valid), .result(result), .flags(flags), .state(state));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tdp_path_t path_of(input logic [31:0] pa, input logic [31:0] pb, input logic ps);
    logic [31:0] bb, x, y;
    int d;
    bb = {pb[31] ^ ps, pb[30:0]};
    if (pb[30:0] > pa[30:0]) begin x = bb; y = pa; end else begin x = pa; y = bb; end
    d = int'(x[30:23]) - int'(y[30:23]);
    if (x[30:23] == 8'hFF || y[30:23] == 8'hFF || x[30:23] == 0 || y[30:23] == 0 || d > 25)
      return PATH_I_BP;
    if (x[31] != y[31] && d <= 1) return PATH_J_LZA;
    return PATH_K_LZB;
  endfunction

  // checks, made after each rising edge has settled
  always @(negedge clk) if (rst_n) begin
    if (q_state.size() > 0 && q_state[0].due == cyc) begin
      exp_t e;
      e = q_state.pop_front();
      checks++;
      if (state !== e.path) begin
        failures++;
        $display("FAIL state %0d expected %0d at cycle %0d", state, e.path, cyc);
      end
    end
    state_seen[state]++;
    trans_seen[last_state][state]++;
    last_state = state;
    if (out_valid) begin
      checks++;
      if (q_out.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cyc);
      end else begin
        exp_t e;
        e = q_out.pop_front();
        if (e.due != cyc || result !== e.res || flags !== e.flg) begin
          failures++;
          $display("FAIL cycle %0d (due %0d): got %h/%b exp %h/%b", cyc, e.due, result, flags, e.res, e.flg);
        end
        if (flags.ovf) n_ovf++;
        if (flags.unf) n_unf++;
        if (flags.inv) n_inv++;
        if (flags.inx) n_inx++;
      end
    end else if (q_out.size() > 0 && q_out[0].due < cyc) begin
      checks++;
      failures++;
      $display("FAIL missing output due at %0d", q_out[0].due);
      void'(q_out.pop_front());
    end
  end

  task automatic gen(output logic [31:0] ga, output logic [31:0] gb, output logic gs);
    int kind, e1;
    kind = int'($urandom % 8);
    e1   = 1 + int'($urandom % 254);
    ga   = rand_sp(e1, e1);
    gs   = 1'($urandom);
    case (kind)
      0, 1: begin                                    // close: cancellation
        gb = rand_sp(e1 - int'($urandom % 2) < 1 ? 1 : e1 - int'($urandom % 2), e1);
        gb[22:0] = ga[22:0] ^ 23'($urandom % 64);
        gb[31] = ga[31] ^ ~gs;
      end
      2, 3: gb = rand_sp(e1 > 24 ? e1 - 24 : 1, e1);    // far path
      4: begin                                        // overflow / underflow edges
        if ($urandom % 2) begin ga = rand_sp(254, 254); gb = rand_sp(253, 254); gb[31] = ga[31] ^ gs; end
        else begin ga = rand_sp(1, 2); gb = rand_sp(1, 2); gb[31] = ga[31] ^ ~gs; end
      end
      5: gb = rand_sp(1, 254);                        // often a large gap
      6: begin                                        // specials
        case ($urandom % 4)
          0: gb = {1'($urandom), 8'hFF, 23'd0};
          1: gb = {1'($urandom), 8'hFF, 23'($urandom | 1)};
          2: gb = {1'($urandom), 8'h00, 23'd0};
          default: begin ga = {1'($urandom), 8'hFF, 23'd0}; gb = {1'($urandom), 8'hFF, 23'd0}; end
        endcase
      end
      default: gb = rand_sp(e1 > 3 ? e1 - 3 : 1, e1 < 252 ? e1 + 2 : 254);
    endcase
  endtask

  initial begin
    logic [4:0] f;
    logic [31:0] r;
    exp_t ne;
    last_state = PATH_I_BP;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      if (in_valid) begin
        gen(a, b, sub);
        r = ref_add(a, b, sub, f);
        // sampled at the coming edge (cycle cyc+1); state one edge later; result two
        ne.res  = r;
        ne.flg  = f;
        ne.path = path_of(a, b, sub);
        ne.due  = cyc + 2;
        q_state.push_back(ne);
        ne.due  = cyc + 6;
        q_out.push_back(ne);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (q_out.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q_out.size());
    end
    for (int s = 0; s < 3; s++) begin
      for (int t = 0; t < 3; t++) begin
        checks++;
        if (trans_seen[s][t] == 0) begin
          failures++;
          $display("FAIL transition %0d -> %0d never seen", s, t);
        end
      end
    end
    checks += 4;
    if (n_ovf == 0) failures++;
    if (n_unf == 0) failures++;
    if (n_inv == 0) failures++;
    if (n_inx == 0) failures++;
    $display("states I %0d J %0d K %0d; ovf %0d unf %0d inv %0d inx %0d", state_seen[0],
             state_seen[1], state_seen[2], n_ovf, n_unf, n_inv, n_inx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
