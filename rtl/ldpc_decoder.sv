// ldpc_decoder: partially parallel (3,6)-regular LDPC decoder with an
// SNR-driven adaptive tentative decision and parity check.
//
// Datapath: eight bit node units (BNU0..7), eight edge-message memories
// (MEM0..7), eight check node units (CNU0..7), a rotating crossbar between
// the memories and the CNUs, an address generation unit, the tentative
// decision unit with its decision memory (eight one-bit banks), and the
// parity-check unit. Bank k holds everything about bits k*2P..k*2P+2P-1:
// their channel LLRs, the messages on their 3*2P edges and their decisions.
// Each edge word holds the latest message on that edge, bit-to-check after a
// bit node phase and check-to-bit after a check node phase.
//
// Decoding (normalised min-sum, see cnu and bnu) iterates three phases of
// 6P read cycles each:
//   check node phase  every CNU processes the P checks of its row block,
//                     one message per cycle through the crossbar; in
//                     iteration 1 the channel LLRs are read in place of the
//                     edge memories, which is the Z_mn = F_n initialisation;
//   bit node phase    every BNU processes the 2P bits of its own bank;
//   parity phase      the decision banks are read with the check-phase
//                     addresses and every check's six bits are XORed.
// The SNR index (snr_idx, sampled when the last LLR word is taken) selects
// from snr_lut the first iteration in which the tentative decision is
// stored and the parity phase is run, and the min-sum alpha. Earlier
// iterations run only the check and bit node phases.
//
// Interface: load 2P words with llr_valid/llr_ready, word b carrying local
// bit b of every lane (global bit k*2P + b on lane k). Decisions come out
// as 2P words on out_valid, out_addr = b, out_bits[k] = bit k*2P + b, after
// which done pulses with success, iters and par_runs. Timing per iteration:
// 2 or 3 phases of 6P + 9 cycles each (see ldpc_ctrl).
//
// Following the published architecture: eight BNUs, eight memories and
// eight CNUs with a crossbar, an AGU that also addresses the parity check,
// a tentative unit writing a decision memory, a normalised min-sum
// algorithm, and tentative decision plus parity check gated by an SNR
// table. This design's own: the code construction, the memory layout and
// word widths, the channel LLR memories, the sequential phase timing and
// the read-out port.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int P      = 576,
  parameter int MAX_IT = MAX_ITER,
  parameter int BAW    = $clog2(2*P),
  parameter int EAW    = $clog2(DV*2*P)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  snr_idx_t       snr_idx,
  input  logic           llr_valid,
  output logic           llr_ready,
  input  msg_t           llr_in   [LANES],
  output logic           out_valid,
  output logic [BAW-1:0] out_addr,
  output logic           out_bits [LANES],
  output logic           busy,
  output logic           done,
  output logic           success,
  output iter_t          iters,
  output iter_t          par_runs,
  output iter_t          min_iter,
  output alpha_t         alpha
);
  localparam int CNU_LAT = 7;  // edge read to check-to-bit write-back
  localparam int BNU_LAT = 4;  // edge read to bit-to-check write-back

  // ---------------------------------------------------------------- control
  logic           llr_we, lut_load, check_en, first_iter;
  logic           phase_check, phase_bit, phase_parity;
  logic           tent_start, tent_en, pc_clear, pc_fail;
  logic           agu_start, dm_re_out;
  logic [BAW-1:0] llr_waddr, dm_raddr_out;
  agu_mode_e      agu_mode;
  iter_t          iter;

  ldpc_ctrl #(.P(P), .MAX_IT(MAX_IT)) u_ctrl (
    .clk, .rst_n,
    .in_valid(llr_valid), .in_ready(llr_ready), .llr_we, .llr_waddr,
    .lut_load, .check_en, .iter,
    .agu_mode, .agu_start, .first_iter, .phase_check, .phase_bit, .phase_parity,
    .tent_start, .tent_en, .pc_clear, .pc_fail,
    .dm_re_out, .dm_raddr_out, .out_valid, .out_addr,
    .busy, .done, .success, .iters, .par_runs
  );

  snr_lut #(.MAX_IT(MAX_IT)) u_lut (
    .clk, .rst_n, .load(lut_load), .snr_idx, .iter,
    .min_iter, .alpha, .check_en
  );

  // -------------------------------------------------------------------- AGU
  logic           rd_valid, rd_last;
  logic [2:0]     slot;
  logic [BAW-1:0] bit_addr  [LANES];
  logic [EAW-1:0] edge_addr [LANES];

  agu #(.P(P)) u_agu (
    .clk, .rst_n, .start(agu_start), .mode(agu_mode),
    .rd_valid, .rd_last, .slot, .bit_addr, .edge_addr
  );

  // read-side timing (memories have one cycle of read latency)
  logic       rd_valid_d1;
  logic [2:0] slot_d1;
  logic [EAW-1:0] ea_pipe [CNU_LAT][LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid_d1 <= 1'b0;
      slot_d1     <= '0;
      for (int d = 0; d < CNU_LAT; d++)
        for (int m = 0; m < LANES; m++) ea_pipe[d][m] <= '0;
    end else begin
      rd_valid_d1 <= rd_valid;
      slot_d1     <= slot;
      for (int m = 0; m < LANES; m++) begin
        ea_pipe[0][m] <= edge_addr[m];
        for (int d = 1; d < CNU_LAT; d++) ea_pipe[d][m] <= ea_pipe[d-1][m];
      end
    end
  end

  // --------------------------------------------------------------- memories
  logic [MSG_W-1:0] llr_rdata [LANES];
  logic [MSG_W-1:0] mem_rdata [LANES];
  logic [MSG_W-1:0] mem_wdata [LANES];
  logic             mem_we    [LANES];
  logic [EAW-1:0]   mem_waddr [LANES];
  logic [0:0]       dm_rdata  [LANES];
  logic             dm_we     [LANES];
  logic [BAW-1:0]   dm_waddr  [LANES];
  logic             dm_wdata  [LANES];

  logic [MSG_W-1:0] cnu_out  [LANES];
  logic [MSG_W-1:0] cnu_back [LANES];
  logic             cnu_ov   [LANES];
  logic [2:0]       cnu_os   [LANES];
  msg_t             bnu_out  [LANES];
  logic             bnu_ov   [LANES];
  logic             bnu_tv   [LANES];
  sum_t             bnu_tot  [LANES];

  for (genvar m = 0; m < LANES; m++) begin : g_bank
    sdp_ram #(.DEPTH(2*P), .WIDTH(MSG_W)) u_llr (
      .clk, .we(llr_we), .waddr(llr_waddr), .wdata(llr_in[m]),
      .re(rd_valid && ((phase_check && first_iter) || (phase_bit && slot == 3'd0))),
      .raddr(bit_addr[m]), .rdata(llr_rdata[m])
    );

    always_comb begin
      if (phase_check) begin
        mem_we[m]    = cnu_ov[0];
        mem_waddr[m] = ea_pipe[CNU_LAT-1][m];
        mem_wdata[m] = cnu_back[m];
      end else begin
        mem_we[m]    = phase_bit && bnu_ov[m];
        mem_waddr[m] = ea_pipe[BNU_LAT-1][m];
        mem_wdata[m] = bnu_out[m];
      end
    end

    sdp_ram #(.DEPTH(DV*2*P), .WIDTH(MSG_W)) u_mem (
      .clk, .we(mem_we[m]), .waddr(mem_waddr[m]), .wdata(mem_wdata[m]),
      .re(rd_valid && ((phase_check && !first_iter) || phase_bit)),
      .raddr(edge_addr[m]), .rdata(mem_rdata[m])
    );

    sdp_ram #(.DEPTH(2*P), .WIDTH(1)) u_dec (
      .clk, .we(dm_we[m]), .waddr(dm_waddr[m]), .wdata(dm_wdata[m]),
      .re((rd_valid && phase_parity) || dm_re_out),
      .raddr(dm_re_out ? dm_raddr_out : bit_addr[m]), .rdata(dm_rdata[m])
    );

    assign out_bits[m] = dm_rdata[m][0];
  end

  // ---------------------------------------------- crossbar and check nodes
  logic [MSG_W-1:0] cnu_src [LANES];
  logic [MSG_W-1:0] cnu_in  [LANES];
  always_comb
    for (int m = 0; m < LANES; m++) cnu_src[m] = first_iter ? llr_rdata[m] : mem_rdata[m];

  xbar_rot #(.WIDTH(MSG_W), .LANES(LANES), .INVERSE(1'b0)) u_xbar_rd (
    .rot(slot_d1), .din(cnu_src), .dout(cnu_in)
  );

  for (genvar r = 0; r < LANES; r++) begin : g_cnu
    msg_t o;
    cnu u_cnu (
      .clk, .rst_n,
      .in_valid(rd_valid_d1 && phase_check), .in_slot(slot_d1), .in_msg(msg_t'(cnu_in[r])),
      .alpha, .out_valid(cnu_ov[r]), .out_slot(cnu_os[r]), .out_msg(o)
    );
    assign cnu_out[r] = o;
  end

  xbar_rot #(.WIDTH(MSG_W), .LANES(LANES), .INVERSE(1'b1)) u_xbar_wr (
    .rot(cnu_os[0]), .din(cnu_out), .dout(cnu_back)
  );

  // -------------------------------------------------------------- bit nodes
  for (genvar m = 0; m < LANES; m++) begin : g_bnu
    bnu u_bnu (
      .clk, .rst_n,
      .in_valid(rd_valid_d1 && phase_bit), .in_edge(slot_d1[1:0]),
      .in_msg(msg_t'(mem_rdata[m])), .in_llr(msg_t'(llr_rdata[m])),
      .out_valid(bnu_ov[m]), .out_edge(), .out_msg(bnu_out[m]),
      .tot_valid(bnu_tv[m]), .tot(bnu_tot[m])
    );
  end

  // ------------------------------------------------ tentative and parity
  tentative_unit #(.P(P)) u_tent (
    .clk, .rst_n, .start(tent_start), .enable(tent_en),
    .tot_valid(bnu_tv), .tot(bnu_tot),
    .dm_we, .dm_waddr, .dm_wdata
  );

  logic [0:0] dm_bits [LANES];
  logic [0:0] pc_bits [LANES];
  logic       pc_bit  [LANES];
  always_comb for (int m = 0; m < LANES; m++) begin
    dm_bits[m] = dm_rdata[m];
    pc_bit[m]  = pc_bits[m][0];
  end

  xbar_rot #(.WIDTH(1), .LANES(LANES), .INVERSE(1'b0)) u_xbar_pc (
    .rot(slot_d1), .din(dm_bits), .dout(pc_bits)
  );

  parity_check u_pc (
    .clk, .rst_n, .clear(pc_clear), .in_valid(rd_valid_d1 && phase_parity),
    .in_slot(slot_d1), .in_bit(pc_bit), .fail(pc_fail), .checks(), .unsat()
  );

  a_sweep_in_phase: assert property (@(posedge clk) disable iff (!rst_n)
    rd_last |-> (phase_check || phase_bit || phase_parity));
endmodule
