// cfg_regs: in-system reconfigurable parameter store of the emulator core.
//
// The host writes every filter coefficient, delay and switch of the building
// blocks through a simple word-write port. Writes go to a shadow copy; a
// commit request makes the whole shadow copy active on the next sample strobe,
// so a new topology or a new set of line characteristics (for example a
// temperature step of a time-varying channel) takes effect between two
// samples, never in the middle of a filter schedule. pending stays high from
// the commit request until the copy has happened.
//
// Address map, per building block b (word address = b * 128 + offset):
//   0x00 + 5k + c        line section stage k, coefficient c
//   0x20 + 5k + c        bridged tap stage k, coefficient c
//   0x40 + 5(3j + i) + c node entry from port i to port j, coefficient c
//   0x70                 line delay (samples)
//   0x71                 tap delay (samples)
//   0x72                 bit 0 line_bypass, bit 1 node_bypass, bit 2 tap_en
// with c = 0..4 for b0, b1, b2, a1, a2 (Q2.16 in data bits 17:0). Other
// offsets are ignored. After reset every line stage passes the signal
// unchanged (b0 = 1), taps are silent, nodes are bypassed and delays are 0,
// so the core starts as a transparent connection.
//
// The document says the line and node characteristics are uploaded to the
// blocks from the host over USB and that blocks are reconfigurable in system;
// the register map, the shadow copy and the commit are this design's own.
module cfg_regs
  import emu_pkg::*;
#(
  parameter int N_BBB  = 3,
  parameter int STAGES = 2,
  parameter int DEPTH  = 256,
  localparam int AW    = $clog2(DEPTH),
  localparam int BW    = (N_BBB > 1) ? $clog2(N_BBB) : 1,
  localparam int CAW   = BW + 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  stb,
  // host write port
  input  logic                  we,
  input  logic [CAW-1:0]        addr,
  input  logic [31:0]           wdata,
  input  logic                  commit,
  output logic                  pending,
  // active configuration
  output bq_coef_t [STAGES-1:0] line_coef  [N_BBB],
  output bq_coef_t [STAGES-1:0] tap_coef   [N_BBB],
  output bq_coef_t [2:0][2:0]   node_coef  [N_BBB],
  output logic [AW-1:0]         line_delay [N_BBB],
  output logic [AW-1:0]         tap_delay  [N_BBB],
  output bbb_ctrl_t             ctrl       [N_BBB]
);

  initial assert (STAGES >= 1 && STAGES <= 6)
    else $error("cfg_regs: the register map holds 1 to 6 stages per section");

  bq_coef_t [STAGES-1:0] line_sh  [N_BBB];
  bq_coef_t [STAGES-1:0] tap_sh   [N_BBB];
  bq_coef_t [2:0][2:0]   node_sh  [N_BBB];
  logic [AW-1:0]         ldel_sh  [N_BBB];
  logic [AW-1:0]         tdel_sh  [N_BBB];
  bbb_ctrl_t             ctrl_sh  [N_BBB];

  logic [BW-1:0] blk;
  logic [6:0]    off;
  coef_t         cval;

  assign blk  = addr[CAW-1:7];
  assign off  = addr[6:0];
  assign cval = coef_t'(wdata[COEF_W-1:0]);

  // Offset decoding: region, section and coefficient index.
  int unsigned rel;       // offset within the region
  int unsigned sec;       // stage (line, tap) or matrix entry (node)
  int unsigned cidx;      // coefficient within the section
  int unsigned nto, nfrom;
  logic        line_hit, tap_hit, node_hit;

  always_comb begin
    rel      = (off >= 7'h40) ? int'(off) - 'h40 : int'(off) % 'h20;
    sec      = rel / 5;
    cidx     = rel % 5;
    nto      = sec / 3;
    nfrom    = sec % 3;
    line_hit = (off < 7'h20) && (rel < 5 * STAGES);
    tap_hit  = (off >= 7'h20) && (off < 7'h40) && (rel < 5 * STAGES);
    node_hit = (off >= 7'h40) && (rel < 45);
  end

  // Replace coefficient c (b0, b1, b2, a1, a2) of a section.
  function automatic bq_coef_t set_coef(bq_coef_t cur, int unsigned c, coef_t v);
    bq_coef_t r;
    r = cur;
    case (c)
      0:       r.b0 = v;
      1:       r.b1 = v;
      2:       r.b2 = v;
      3:       r.a1 = v;
      default: r.a2 = v;
    endcase
    return r;
  endfunction

  function automatic bq_coef_t unity();
    bq_coef_t r;
    r    = '0;
    r.b0 = COEF_ONE;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      for (int b = 0; b < N_BBB; b++) begin
        for (int k = 0; k < STAGES; k++) begin
          line_sh[b][k]   <= unity();
          tap_sh[b][k]    <= '0;
          line_coef[b][k] <= unity();
          tap_coef[b][k]  <= '0;
        end
        node_sh[b]    <= '0;
        node_coef[b]  <= '0;
        ldel_sh[b]    <= '0;
        tdel_sh[b]    <= '0;
        line_delay[b] <= '0;
        tap_delay[b]  <= '0;
        ctrl_sh[b]    <= '{tap_en: 1'b0, node_bypass: 1'b1, line_bypass: 1'b0};
        ctrl[b]       <= '{tap_en: 1'b0, node_bypass: 1'b1, line_bypass: 1'b0};
      end
    end else begin
      if (we && (int'(blk) < N_BBB)) begin
        if (line_hit) line_sh[blk][sec] <= set_coef(line_sh[blk][sec], cidx, cval);
        if (tap_hit)  tap_sh[blk][sec]  <= set_coef(tap_sh[blk][sec], cidx, cval);
        if (node_hit) node_sh[blk][nto][nfrom] <= set_coef(node_sh[blk][nto][nfrom], cidx, cval);
        if (off == 7'h70) ldel_sh[blk] <= wdata[AW-1:0];
        if (off == 7'h71) tdel_sh[blk] <= wdata[AW-1:0];
        if (off == 7'h72) ctrl_sh[blk] <= '{tap_en: wdata[2], node_bypass: wdata[1],
                                            line_bypass: wdata[0]};
      end

      if (stb && pending) begin
        pending    <= 1'b0;
        line_coef  <= line_sh;
        tap_coef   <= tap_sh;
        node_coef  <= node_sh;
        line_delay <= ldel_sh;
        tap_delay  <= tdel_sh;
        ctrl       <= ctrl_sh;
      end
      if (commit) pending <= 1'b1;
    end
  end

endmodule
