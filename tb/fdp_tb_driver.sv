// fdp_tb_driver: stimulus and checking for one pffdp configuration.
//
// Streams NVEC random operand sets into a pffdp instance (in_valid high on
// about 80% of the cycles), computes every expected result and flag set with
// fdp_ref_pkg::ref_fdp, and checks each output when out_valid rises exactly
// LATENCY cycles after its operands went in. The operand sets mix ordinary
// values, exact and near cancellation, overflow, underflow, zeros,
// infinities, NaNs and raw random bit patterns. SHORT_MANT = 1 keeps only
// the top 8 fraction bits and exponents near the bias, so that sums of
// more than two products stay exact inside the aligned field.
// done rises when all results are back; the counters report what happened.
module fdp_tb_driver #(
  parameter int unsigned EXP_W      = 8,
  parameter int unsigned MAN_W      = 23,
  parameter int unsigned N_TERMS    = 2,
  parameter int unsigned NVEC       = 200,
  parameter int unsigned SEED       = 1,
  parameter bit          SHORT_MANT = 0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_cancel,
  output int   n_overflow,
  output int   n_underflow,
  output int   n_invalid,
  output int   n_negative
);
  import fdp_ref_pkg::*;
  import fdp_pkg::*;

  localparam int unsigned FW      = 1 + EXP_W + MAN_W;
  localparam int          BIAS    = (1 << (EXP_W - 1)) - 1;
  localparam int          EMAXF   = (1 << EXP_W) - 1;
  localparam int          LATENCY = 4;

  logic          in_valid, out_valid;
  logic [FW-1:0] a [N_TERMS], b [N_TERMS];
  logic [FW-1:0] result;
  fdp_flags_t    flags;

  pffdp #(.EXP_W(EXP_W), .MAN_W(MAN_W), .N_TERMS(N_TERMS)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .result(result), .flags(flags)
  );

  ref_out_t exp_q [$];
  int       cyc_q [$];
  int       cycle;
  int       sent;
  int       unsigned rng;

  function automatic logic [63:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  function automatic logic [FW-1:0] mk(logic s, int e, logic [63:0] m);
    logic [63:0] mm;
    mm = m & ((64'd1 << MAN_W) - 1);
    if (SHORT_MANT) mm = mm & ~((64'd1 << (MAN_W - 8)) - 1);
    if (e < 1) e = 1;
    if (e > EMAXF - 1) e = EMAXF - 1;
    return FW'((64'(s) << (FW - 1)) | (64'(e) << MAN_W) | mm);
  endfunction

  function automatic logic [FW-1:0] normal(int spread);
    return mk(1'($urandom()), BIAS + int'($urandom_range(0, 2 * spread)) - spread, rnd64());
  endfunction

  task automatic gen(output logic [FW-1:0] va [N_TERMS], output logic [FW-1:0] vb [N_TERMS]);
    int sc;
    int spread;
    spread = SHORT_MANT ? 4 : 30;
    sc = int'($urandom_range(0, 9));
    for (int i = 0; i < N_TERMS; i++) begin
      va[i] = normal(spread);
      vb[i] = normal(spread);
    end
    case (sc)
      4: begin // exact cancellation of the last product against the first
        va[N_TERMS-1] = va[0] ^ (FW'(1) << (FW - 1));
        vb[N_TERMS-1] = vb[0];
        for (int i = 1; i < N_TERMS - 1; i++) va[i] = '0;
      end
      5: begin // near cancellation: few low bits differ
        va[N_TERMS-1] = va[0] ^ (FW'(1) << (FW - 1));
        vb[N_TERMS-1] = vb[0] ^ FW'(SHORT_MANT ? (1 << (MAN_W - 8 + $urandom_range(0, 7)))
                                               : $urandom_range(1, 255));
        for (int i = 1; i < N_TERMS - 1; i++) va[i] = '0;
      end
      6: begin // large exponents: overflow
        for (int i = 0; i < N_TERMS; i++) begin
          va[i] = mk(1'($urandom()), EMAXF - 1 - int'($urandom_range(0, 3)), rnd64());
          vb[i] = mk(1'($urandom()), BIAS + int'($urandom_range(0, 3)), rnd64());
        end
      end
      7: begin // small exponents: underflow or near it
        for (int i = 0; i < N_TERMS; i++) begin
          va[i] = mk(1'($urandom()), 1 + int'($urandom_range(0, 3)), rnd64());
          vb[i] = mk(1'($urandom()), BIAS - int'($urandom_range(0, 3)), rnd64());
        end
      end
      8: begin // special operands
        int k;
        k = int'($urandom_range(0, N_TERMS - 1));
        case ($urandom_range(0, 3))
          0: va[k] = FW'(64'($urandom_range(0, 1)) << (FW - 1));                     // zero
          1: va[k] = FW'((64'($urandom_range(0, 1)) << (FW - 1)) | (64'(EMAXF) << MAN_W)); // inf
          2: va[k] = FW'((64'(EMAXF) << MAN_W) | 64'($urandom_range(1, 7)));          // NaN
          default: begin                                                              // inf * 0
            va[k] = FW'(64'(EMAXF) << MAN_W);
            vb[k] = '0;
          end
        endcase
      end
      9: if (!SHORT_MANT) begin // raw bit patterns
        for (int i = 0; i < N_TERMS; i++) begin
          va[i] = FW'(rnd64());
          vb[i] = FW'(rnd64());
        end
      end
      default: ;
    endcase
  endtask

  // Stimulus
  initial begin
    logic [FW-1:0] va [N_TERMS], vb [N_TERMS];
    logic [63:0]   da [], db [];
    void'($urandom(SEED));
    in_valid = 1'b0;
    for (int i = 0; i < N_TERMS; i++) begin a[i] = '0; b[i] = '0; end
    sent = 0;
    da = new[N_TERMS];
    db = new[N_TERMS];
    @(posedge rst_n);
    while (sent < int'(NVEC)) begin
      @(negedge clk);
      if ($urandom_range(0, 9) < 8) begin
        gen(va, vb);
        a = va;
        b = vb;
        for (int i = 0; i < N_TERMS; i++) begin da[i] = 64'(va[i]); db[i] = 64'(vb[i]); end
        exp_q.push_back(ref_fdp(EXP_W, MAN_W, N_TERMS, da, db));
        cyc_q.push_back(cycle + 1);   // sampled at the next rising edge
        in_valid = 1'b1;
        sent++;
      end else begin
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // Checking
  initial begin
    cycle = 0; checks = 0; failures = 0; done = 1'b0;
    n_cancel = 0; n_overflow = 0; n_underflow = 0; n_invalid = 0; n_negative = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (out_valid && rst_n) begin
      ref_out_t e;
      int       c0;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL %m: unexpected result %h", result);
      end else begin
        e  = exp_q.pop_front();
        c0 = cyc_q.pop_front();
        checks += 3;
        if (result !== FW'(e.result)) begin
          failures++;
          $display("FAIL %m: result %h expected %h", result, FW'(e.result));
        end
        if (flags !== {e.invalid, e.overflow, e.underflow, e.cancel}) begin
          failures++;
          $display("FAIL %m: flags %b expected %b (result %h)", flags,
                   {e.invalid, e.overflow, e.underflow, e.cancel}, result);
        end
        if (cycle - c0 + 1 != LATENCY) begin
          failures++;
          $display("FAIL %m: latency %0d expected %0d", cycle - c0 + 1, LATENCY);
        end
        n_cancel    += int'(e.cancel);
        n_overflow  += int'(e.overflow);
        n_underflow += int'(e.underflow);
        n_invalid   += int'(e.invalid);
        n_negative  += int'(result[FW-1] && !e.invalid);
        if (sent == int'(NVEC) && exp_q.size() == 0) done <= 1'b1;
      end
    end
  end

endmodule
