// nbd_width_env: one copy of the end-to-end environment of tb_nbd_frontend
// (the same synthetic program, three-stage pipeline model, unfiltered
// reference predictor and checks), with the front end built for a given
// NBD width. It runs RETIRE_TARGET instructions, then raises done and holds
// its check and failure counts and its lookup count for the instantiating
// testbench. Saturation of the distance is only required where the 600-
// instruction basic block exceeds the largest distance the width can hold.
module nbd_width_env #(
  parameter int unsigned NBD_W = 9,
  parameter int unsigned RETIRE_TARGET = 30000
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   fetches,
  output int   lookups
);
  localparam int unsigned PC_W = 32, BTB_N = 512, DIR_N = 16384, DIR_IDX_W = 14;
  localparam int MAXNBD = (1 << NBD_W) - 1;

  typedef enum logic [1:0] {K_NOP, K_COND, K_JMP, K_IND} kind_e;

  logic clk = 0, rst_n = 0;
  logic if_advance;
  logic [PC_W-1:0] if_pc, if_pred_npc;
  logic if_lookup_en, if_pred_taken;
  logic [DIR_IDX_W-1:0] if_dir_idx;
  logic ex_valid, ex_branch, ex_taken, ex_mispredict;
  logic [PC_W-1:0] ex_pc, ex_target, ex_pred_npc, ex_actual_npc;
  logic [DIR_IDX_W-1:0] ex_dir_idx;

  nbd_frontend #(.NBD_W(NBD_W)) dut (.*);

  always #5 clk = ~clk;

  int cycles = 0, retired = 0;
  initial begin checks = 0; failures = 0; fetches = 0; lookups = 0; done = 0; end
  int n_filtered = 0, n_collect = 0, n_er_load = 0, n_er_default = 0, n_flush = 0;
  int n_dir_misp = 0, n_tgt_misp = 0, n_alloc = 0, n_replace = 0, n_tgt_inv = 0;
  int n_sat = 0, n_stall = 0, n_loop_ok = 0;
  // true distance since the previous executed branch
  int t_dist = 0;
  bit redir_pending = 0;
  logic [31:0] redir_pc = '0;
  logic [31:0] t_prev_pc = '0;
  logic t_prev_dir = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  // ------------------------------------------------------------- program
  function automatic kind_e kind_of(input logic [PC_W-1:0] pc);
    case (pc)
      32'h008, 32'h018, 32'h020, 32'h804: return K_COND;
      32'h02C, 32'h1208, 32'h1A08:        return K_JMP;
      32'h1170:                           return K_IND;
      default:                            return K_NOP;
    endcase
  endfunction

  int cnt_008 = 0, cnt_018 = 0, cnt_804 = 0, cnt_1170 = 0;
  logic [PC_W-1:0] arch_pc;

  // Resolve the instruction at pc on the architectural path (called once per
  // executed instruction, in program order).
  task automatic resolve(input logic [PC_W-1:0] pc, output bit br, output bit tk,
                         output logic [PC_W-1:0] tg);
    br = kind_of(pc) != K_NOP; tk = 0; tg = '0;
    case (pc)
      32'h008:  begin tk = (cnt_008 % 10) != 9; tg = 32'h000; cnt_008++; end
      32'h018:  begin tk = (cnt_018 % 2) == 0;  tg = 32'h024; cnt_018++; end
      32'h020:  begin tk = $urandom_range(0, 1) == 1; tg = 32'h028; end
      32'h804:  begin tk = (cnt_804 % 3) != 0;  tg = 32'h810; cnt_804++; end
      32'h02C:  begin tk = 1; tg = 32'h800; end
      32'h1208, 32'h1A08: begin tk = 1; tg = 32'h000; end
      32'h1170: begin tk = 1; tg = ((cnt_1170 / 4) % 2) ? 32'h1A00 : 32'h1200; cnt_1170++; end
      default: ;
    endcase
  endtask

  // ------------------------------------------------- reference predictor
  bit              r_v[BTB_N];
  logic [PC_W-1:0] r_pc[BTB_N], r_t[BTB_N];
  int              r_ctr[DIR_N];
  logic [DIR_IDX_W-1:0] r_ghr;

  function automatic int bidx(input logic [PC_W-1:0] pc);
    return int'(pc[10:2]);
  endfunction

  function automatic logic [PC_W-1:0] ref_npc(input logic [PC_W-1:0] pc, output bit hit);
    int b, d;
    b = bidx(pc);
    d = int'(pc[15:2] ^ r_ghr);
    hit = r_v[b] && r_pc[b] == pc;
    return (hit && r_ctr[d] >= 2) ? r_t[b] : pc + 4;
  endfunction

  // ---------------------------------------------------- pipeline model
  logic id_v;
  logic [PC_W-1:0] id_pc, id_pred_npc;
  logic [DIR_IDX_W-1:0] id_dir_idx;


  initial begin
    for (int i = 0; i < int'(BTB_N); i++) begin r_v[i] = 0; r_pc[i] = 0; r_t[i] = 0; end
    r_ghr = '0;
    arch_pc = '0;
    id_v = 0; id_pc = 0; id_pred_npc = 0; id_dir_idx = 0;
    ex_valid = 0; ex_pc = 0; ex_branch = 0; ex_taken = 0; ex_target = 0;
    ex_pred_npc = 0; ex_dir_idx = 0;
    if_advance = 0;
    #22 rst_n = 1;
    // the gshare counters are not reset: start from the table's contents
    for (int i = 0; i < int'(DIR_N); i++) r_ctr[i] = int'(dut.u_dirpred.ctr_q[i]);
  end

  always @(negedge clk) if (rst_n) if_advance = $urandom_range(0, 9) != 0;

  always @(posedge clk) if (rst_n && !done) begin
    bit hit, br, tk;
    logic [PC_W-1:0] rnpc, tg;
    cycles++;

    // --- a redirect takes effect on the next cycle, with lookups enabled
    if (redir_pending) begin
      chk(if_pc == redir_pc && if_lookup_en, "fetch restarts at the corrected PC one cycle after a misprediction, EN = 1");
      redir_pending = 0;
    end
    if (ex_mispredict) begin redir_pending = 1; redir_pc = ex_actual_npc; end

    // --- observe the fetch stage (values before this edge)
    if (!if_advance) n_stall++;
    if (if_advance && !ex_mispredict) begin
      fetches++;
      if (if_lookup_en) lookups++; else n_filtered++;
      rnpc = ref_npc(if_pc, hit);
      chk(if_pred_npc == rnpc, $sformatf("pc %h: predicted %h, unfiltered %h", if_pc, if_pred_npc, rnpc));
      chk(!(hit && !if_lookup_en), $sformatf("pc %h: lookup of a BTB-resident branch filtered", if_pc));
      if ((if_pc == 32'h000 || if_pc == 32'h004) && !if_lookup_en) n_loop_ok++;
    end

    // --- observe the internal mechanisms
    if (dut.u_btb.lk_hit && dut.u_nbdt.rd_valid && dut.u_nbdt.rd_nbd != 0 && if_advance) n_er_load++;
    if (dut.u_btb.lk_hit && !dut.u_nbdt.rd_valid && if_advance) n_er_default++;
    if (dut.u_collector.nbdt_wr_en) begin
      n_collect++;
      chk(dut.u_collector.nbdt_wr_nbd == NBD_W'(t_dist > MAXNBD ? MAXNBD : t_dist),
          $sformatf("collected NBD %0d, true distance %0d", dut.u_collector.nbdt_wr_nbd, t_dist));
      chk(int'(dut.u_collector.nbdt_wr_idx) == bidx(t_prev_pc), "NBD written to the previous branch's entry");
      chk(dut.u_collector.nbdt_wr_dir == t_prev_dir, "NBD written to the field of its direction");
      if (dut.u_collector.nbdt_wr_nbd == NBD_W'(MAXNBD)) n_sat++;
    end
    if (dut.u_collector.btb_alloc) begin
      n_alloc++;
      if (dut.u_btb.valid_q[dut.u_btb.ex_idx]) n_replace++;
    end
    if (dut.u_collector.btb_update_target && dut.u_collector.nbdt_inv_en) n_tgt_inv++;
    if (ex_mispredict) begin
      n_flush++;
      if (ex_branch && ex_taken && ex_pred_npc != ex_pc + 4 && ex_pred_npc != ex_target) n_tgt_misp++;
      else n_dir_misp++;
    end

    // --- train the reference predictor with the instruction in EX
    if (ex_valid && ex_branch) begin
      int b, d;
      b = bidx(ex_pc);
      d = int'(ex_dir_idx);
      if (ex_taken) begin
        if (!(r_v[b] && r_pc[b] == ex_pc)) begin r_v[b] = 1; r_pc[b] = ex_pc; r_t[b] = ex_target; end
        else if (r_t[b] != ex_target) r_t[b] = ex_target;
      end
      if (ex_taken && r_ctr[d] < 3) r_ctr[d]++;
      if (!ex_taken && r_ctr[d] > 0) r_ctr[d]--;
      r_ghr = {r_ghr[DIR_IDX_W-2:0], ex_taken};
    end
    if (ex_valid) begin
      retired++;
      if (ex_branch) begin t_prev_pc = ex_pc; t_prev_dir = ex_taken; t_dist = 0; end
      else t_dist++;
    end

    // --- advance the pipeline
    if (ex_mispredict || !id_v) begin
      ex_valid <= 0;
    end else begin
      chk(id_pc == arch_pc, $sformatf("EX got pc %h, architectural pc %h", id_pc, arch_pc));
      resolve(id_pc, br, tk, tg);
      arch_pc = (br && tk) ? tg : id_pc + 4;
      ex_valid <= 1; ex_pc <= id_pc; ex_branch <= br; ex_taken <= tk; ex_target <= tg;
      ex_pred_npc <= id_pred_npc; ex_dir_idx <= id_dir_idx;
    end
    if (ex_mispredict || !if_advance) begin
      id_v <= 0;
    end else begin
      id_v <= 1; id_pc <= if_pc; id_pred_npc <= if_pred_npc; id_dir_idx <= if_dir_idx;
    end

    if (retired >= int'(RETIRE_TARGET)) begin
      chk(n_filtered > 0, "filtered lookups happened");
      chk(n_collect > 0, "NBD collected");
      chk(n_er_load > 0, "ER loaded from a valid NBD");
      chk(n_er_default > 0, "ER loaded with the default NBD");
      chk(n_dir_misp > 0, "direction misprediction flush");
      chk(n_tgt_misp > 0, "target misprediction flush");
      chk(n_alloc > 0, "BTB allocation");
      chk(n_replace > 0, "BTB replacement");
      chk(n_tgt_inv > 0, "target update with tkn_v invalidation");
      if (MAXNBD < 600) chk(n_sat > 0, "NBD saturation");
      else chk(n_sat == 0, "no saturation when the width holds the longest block");
      chk(n_stall > 0, "fetch stall");
      chk(n_loop_ok > 0, "inner-loop ADD/CMP lookups filtered");
      chk(lookups < fetches, "fewer lookups than fetches");
      $display("NBD_W=%0d cycles=%0d retired=%0d fetches=%0d lookups=%0d (%0d.%02d%%)", NBD_W, cycles, retired,
               fetches, lookups, lookups * 100 / fetches, (lookups * 10000 / fetches) % 100);
      $display("filtered=%0d collect=%0d er_load=%0d er_default=%0d flush=%0d dir_misp=%0d tgt_misp=%0d",
               n_filtered, n_collect, n_er_load, n_er_default, n_flush, n_dir_misp, n_tgt_misp);
      $display("alloc=%0d replace=%0d tgt_inv=%0d sat=%0d stall=%0d loop=%0d",
               n_alloc, n_replace, n_tgt_inv, n_sat, n_stall, n_loop_ok);
      done = 1;
    end
  end
endmodule
