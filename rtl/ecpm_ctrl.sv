// Point-multiplication controller: FSM, instruction issue and scoreboard.
//
// Runs the routines of ecpm_rom on the field ALU (hp_modmul and hp_addsub,
// or eff_modmul and eff_addsub) and the memory unit to compute
// [k](X1:Z1) on Curve25519 with the Montgomery ladder (base point
// (X1 : Y1 : Z1) in memory). It then recovers the y coordinate and converts
// the result to affine Ed25519 coordinates XE, YE, fully reduced. Sequence:
// INIT, NBITS ladder steps (bit NBITS-1 of the key first), CONV, INV, POST,
// then a drain until every result has been written back. INIT and every
// ladder step are followed by a wait until the scoreboard is empty.
//
// Issue: at most one instruction per clock, in program order. An
// instruction also waits while its unit signals that it cannot take a new
// operation (mul_ready / as_ready; the Design I units are always ready).
// The operands are read from the memory unit in the issue clock and travel
// with the instruction, so later writes cannot disturb them. A scoreboard
// keeps one pending bit per memory word; an instruction waits (a stall)
// while one of its sources or its destination still has a result in
// flight. Multiplications go to the multiplier; additions, subtractions and
// constant loads go to the adder. Each unit writes its result back with
// the destination address carried as a tag. A MUL with rep = n is followed
// by n squarings of its destination.
//
// Side-channel behaviour: every step runs the same instructions; the
// conditional swap of the ladder is an address remap of X2/Z2 <-> X3/Z3
// selected by the current key bit (no data-dependent branch). With protect
// = 1 the first two instructions of each step multiply X2 and Z2 by the
// random lambda in memory (continuous point re-randomization); otherwise
// they are skipped. The ROM-driven structure, the constant-time ladder and
// the two extra multiplications per step follow the document; the
// scoreboard, the remapping and the instruction format are this design's.
module ecpm_ctrl #(
  parameter int NBITS = 255
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         protect,
  output logic         busy,
  output logic         done,
  // key buffer
  input  logic         key_bit,
  output logic         key_shift,
  // memory read ports (physical addresses)
  output logic [4:0]   ra0,
  output logic [4:0]   ra1,
  input  logic [255:0] rd0,
  input  logic [255:0] rd1,
  // multiplier issue and write-back
  output logic         mul_valid,
  output logic [255:0] mul_a,
  output logic [255:0] mul_b,
  output logic [4:0]   mul_tag,
  input  logic         mul_ready,
  input  logic         mul_wb,
  input  logic [4:0]   mul_wb_tag,
  // adder issue and write-back
  output logic         as_valid,
  output logic         as_sub,
  output logic [255:0] as_a,
  output logic [255:0] as_b,
  output logic [4:0]   as_tag,
  input  logic         as_ready,
  input  logic         as_wb,
  input  logic [4:0]   as_wb_tag,
  // activity counters (since the last start)
  output logic [31:0]  n_cycles,
  output logic [31:0]  n_stalls,
  output logic [31:0]  n_mul,
  output logic [31:0]  n_swaps
);
  import ed25519_pkg::*;

  typedef enum logic [2:0] {PH_IDLE, PH_INIT, PH_LADDER, PH_SYNC, PH_CONV, PH_INV, PH_POST, PH_DRAIN} phase_e;

  phase_e      ph_q;
  logic [6:0]  pc_q;
  logic [8:0]  step_q;        // ladder steps still to run, including this one
  logic        rep_act_q;     // the chained squarings of a MUL are running
  logic [6:0]  rep_left_q;
  logic [31:0] pend_q;        // scoreboard

  uinstr_t ins;
  ecpm_rom u_rom (.pc(pc_q), .ins);

  // address remap of the swappable ladder registers: physical X2/Z2 always
  // hold R0 = [j]P and X3/Z3 hold R1 = [j+1]P; a step with key bit 1
  // doubles R1 and adds into R0, so it sees them swapped
  logic mapping;
  assign mapping = (ph_q == PH_LADDER) && key_bit;

  function automatic logic [4:0] phys(input logic [4:0] a, input logic m);
    return (m && a >= R_X2 && a <= R_Z3) ? (a ^ 5'd6) : a;
  endfunction

  // instruction presented for issue this cycle
  alu_op_e    op;
  logic [4:0] la, lb, ld, pa, pb, pd;
  logic       active, skip, uses_src, can_issue, fire, ins_end;
  always_comb begin
    op = ins.op;
    la = ins.srca;
    lb = ins.srcb;
    ld = ins.dst;
    if (rep_act_q) begin
      op = OP_MUL;
      la = ins.dst;
      lb = ins.dst;
    end
    pa = phys(la, mapping);
    pb = phys(lb, mapping);
    pd = phys(ld, mapping);
    active    = (ph_q != PH_IDLE) && (ph_q != PH_DRAIN) && (ph_q != PH_SYNC);
    skip      = active && !rep_act_q && ins.prot && !protect;
    uses_src  = (op != OP_CONST);
    can_issue = !pend_q[pd] && !(uses_src && (pend_q[pa] || pend_q[pb]))
                && ((op == OP_MUL) ? mul_ready : as_ready);
    fire      = active && !skip && (op != OP_NOP) && can_issue;
    // the routine's last instruction leaves the pc once its squarings are done
    ins_end   = ins.last && (rep_act_q ? (rep_left_q == 7'd1) : (ins.rep == 7'd0));
  end

  assign ra0 = pa;
  assign ra1 = pb;

  // issue to the units
  always_comb begin
    mul_valid = fire && (op == OP_MUL);
    mul_a     = rd0;
    mul_b     = rd1;
    mul_tag   = pd;
    as_valid  = fire && (op == OP_ADD || op == OP_SUB || op == OP_CONST);
    as_sub    = (op == OP_SUB);
    as_a      = (op == OP_CONST) ? alu_const(ins.srca) : rd0;
    as_b      = (op == OP_CONST) ? '0 : rd1;
    as_tag    = pd;
  end

  // scoreboard
  logic [31:0] pend_set, pend_clr;
  always_comb begin
    pend_set = '0;
    pend_clr = '0;
    if (fire)   pend_set[pd] = 1'b1;
    if (mul_wb) pend_clr[mul_wb_tag] = 1'b1;
    if (as_wb)  pend_clr[as_wb_tag] = 1'b1;
  end

  // sequencing
  logic advance;
  assign advance = skip || (fire && (rep_act_q ? (rep_left_q == 7'd1) : (ins.rep == 7'd0)))
                 || (active && op == OP_NOP);

  // the key buffer moves to the next bit in the clock the step ends
  assign key_shift = (ph_q == PH_LADDER) && advance && ins_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q       <= PH_IDLE;
      pc_q       <= '0;
      step_q     <= '0;
      rep_act_q  <= 1'b0;
      rep_left_q <= '0;
      pend_q     <= '0;
      done       <= 1'b0;
      n_cycles   <= '0;
      n_stalls   <= '0;
      n_mul      <= '0;
      n_swaps    <= '0;
    end else begin
      done      <= 1'b0;
      pend_q    <= (pend_q & ~pend_clr) | pend_set;
      if (ph_q != PH_IDLE) n_cycles <= n_cycles + 32'd1;
      if (active && !skip && op != OP_NOP && !can_issue) n_stalls <= n_stalls + 32'd1;
      if (mul_valid) n_mul <= n_mul + 32'd1;

      // chained squarings
      if (fire && !rep_act_q && ins.rep != 7'd0) begin
        rep_act_q  <= 1'b1;
        rep_left_q <= ins.rep;
      end else if (fire && rep_act_q) begin
        rep_left_q <= rep_left_q - 7'd1;
        if (rep_left_q == 7'd1) rep_act_q <= 1'b0;
      end

      case (ph_q)
        PH_IDLE: if (start) begin
          ph_q     <= PH_INIT;
          pc_q     <= PC_INIT;
          step_q   <= 9'(NBITS);
          n_cycles <= '0;
          n_stalls <= '0;
          n_mul    <= '0;
          n_swaps  <= '0;
        end
        PH_DRAIN: if (pend_q == '0) begin
          ph_q <= PH_IDLE;
          done <= 1'b1;
        end
        // every step starts with all results of the previous one written
        // back, so no stall pattern can depend on the key bits
        PH_SYNC: if (pend_q == '0) begin
          if (step_q == 9'd0) begin
            ph_q <= PH_CONV;
            pc_q <= PC_CONV;
          end else begin
            ph_q <= PH_LADDER;
            pc_q <= PC_LADDER;
          end
        end
        default: if (advance) begin
          if (!(ins_end || (active && op == OP_NOP))) pc_q <= pc_q + 7'd1;
          else begin
            case (ph_q)
              // the first step also starts from an empty scoreboard
              PH_INIT: ph_q <= PH_SYNC;
              PH_LADDER: begin
                if (key_bit) n_swaps <= n_swaps + 32'd1;
                step_q <= step_q - 9'd1;
                ph_q   <= PH_SYNC;
              end
              PH_CONV: begin
                ph_q <= PH_INV;
                pc_q <= PC_INV;
              end
              PH_INV: begin
                ph_q <= PH_POST;
                pc_q <= PC_POST;
              end
              default: ph_q <= PH_DRAIN;
            endcase
          end
        end
      endcase
    end
  end

  assign busy = (ph_q != PH_IDLE);

endmodule
