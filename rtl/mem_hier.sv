// mem_hier: two-level memory hierarchy of the dual-PE processor.
//
// Level 2 is the shared memory (MEM), WM bits wide, holding every field
// element in ceil(m/WM) words. Level 1 is the PE-local operand registers: the
// two input registers of each PE (in1, in2) and each PE's result register R.
// The unit serves load and store commands of the two PE slots, one command at
// a time, on a round-robin basis:
//   load  in1/in2 of PE j from entry e
//     - e is the constant 0 or 1: the input mux selects the constant (1 cycle);
//     - e is still in R of PE j (its last stored result): reuse it (1 cycle);
//     - e is still in R of the other PE: local memory synchronization, the
//       value moves directly between the PEs' registers (1 cycle);
//     - otherwise fetch from MEM: ceil(m/WM) word reads plus one cycle of
//       SRAM latency, T_MEM = ceil(m/WM) + 1 cycles, as in the paper.
//   store R of PE j to entry e (write-through): the words pass through the
//     WM-bit MEM buffer register into MEM, T_MEM cycles; afterwards R of PE j
//     is known to hold entry e.
// A PE's R tag is dropped when that PE starts a new operation (R is then
// overwritten) and when the other PE stores to the same entry.
//
// The three routes (MEM, own R, other PE's R) are the paper's input
// multiplexers of MAS in1/in2 and GFAU in1/in2. Every result is stored
// (write-through); the paper additionally keeps some intermediates only in the
// local registers (write-back), which this design does not, so that a value
// is always recoverable from MEM. Commands are acknowledged by cmd_ack[j],
// high in the last cycle of the command. The host port reaches MEM directly
// while host_en is high (the processor is idle); its read data arrive one
// cycle after host_re.
module mem_hier
  import dfecc_pkg::*;
#(
  parameter int unsigned W     = 160,                 // field element width
  parameter int unsigned WM    = 80,                  // shared memory width w
  parameter int unsigned NWPE  = (W + WM - 1) / WM,   // words per entry
  parameter int unsigned DEPTH = NENT * NWPE,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned MW    = $clog2(W + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [MW-1:0]  m,                 // field length
  // PE slot commands (index 0: MAS, 1: GFAU)
  input  logic [1:0]     cmd_valid,
  input  logic [1:0]     cmd_store,         // 1: store R, 0: load
  input  logic [1:0]     cmd_port,          // load target: 0 in1, 1 in2
  input  ent_t           cmd_ent [2],
  output logic [1:0]     cmd_ack,
  // PE side
  input  logic [1:0]     pe_start,          // PE j starts an operation
  input  logic [W-1:0]   pe_res [2],
  output logic [W-1:0]   pe_in1 [2],
  output logic [W-1:0]   pe_in2 [2],
  input  logic           clear_tags,
  // host port
  input  logic           host_en,
  input  logic           host_we,
  input  logic           host_re,
  input  logic [AW-1:0]  host_addr,
  input  logic [WM-1:0]  host_wdata,
  output logic [WM-1:0]  host_rdata,
  // activity counters
  output logic [31:0]    n_fetch,
  output logic [31:0]    n_store,
  output logic [31:0]    n_sync,
  output logic [31:0]    n_reuse
);
  typedef enum logic [1:0] {H_IDLE, H_RD, H_WR} hst_e;

  hst_e              st;
  logic              cur;                  // PE being served
  logic              rr;                   // round-robin priority
  logic              cur_port;
  ent_t              cur_ent;
  logic [AW-1:0]     base;
  logic [$clog2(NWPE+1)-1:0] k, nw;
  logic [W-1:0]      asm_q;                // element being assembled from MEM
  logic [WM-1:0]     mbuf;                 // MEM buffer
  logic [1:0]        tag_vld;
  ent_t              tag [2];

  logic              sel, gnt;
  logic              quick;
  logic [W-1:0]      quick_val;
  logic              m_we, m_re;
  logic [AW-1:0]     m_waddr, m_raddr;
  logic [WM-1:0]     m_wdata, m_rdata;
  logic [W-1:0]      res_sel;

  assign nw = ($clog2(NWPE+1))'((m + MW'(WM - 1)) / MW'(WM));

  // request selection
  always_comb begin
    gnt = 1'b0;
    sel = rr;
    if (st == H_IDLE) begin
      if (cmd_valid[rr]) begin
        gnt = 1'b1; sel = rr;
      end else if (cmd_valid[~rr]) begin
        gnt = 1'b1; sel = ~rr;
      end
    end
  end

  // one-cycle load routes
  always_comb begin
    quick     = 1'b0;
    quick_val = '0;
    if (gnt && !cmd_store[sel]) begin
      if (cmd_ent[sel] == E_ZERO) begin
        quick = 1'b1; quick_val = '0;
      end else if (cmd_ent[sel] == E_ONE) begin
        quick = 1'b1; quick_val = W'(1);
      end else if (tag_vld[sel] && tag[sel] == cmd_ent[sel]) begin
        quick = 1'b1; quick_val = pe_res[sel];
      end else if (tag_vld[~sel] && tag[~sel] == cmd_ent[sel]) begin
        quick = 1'b1; quick_val = pe_res[~sel];
      end
    end
  end

  assign res_sel = pe_res[cur];

  // memory port
  always_comb begin
    m_we    = 1'b0;
    m_re    = 1'b0;
    m_waddr = host_addr;
    m_raddr = host_addr;
    m_wdata = host_wdata;
    if (host_en) begin
      m_we = host_we;
      m_re = host_re;
    end else if (gnt && !cmd_store[sel] && !quick) begin
      m_re    = 1'b1;
      m_raddr = AW'(cmd_ent[sel]) * AW'(NWPE);
    end else if (st == H_RD && k < nw) begin
      m_re    = 1'b1;
      m_raddr = base + AW'(k);
    end else if (st == H_WR) begin
      m_we    = 1'b1;
      m_waddr = base + AW'(k) - 1'b1;
      m_wdata = mbuf;
    end
  end

  assign host_rdata = m_rdata;

  shared_mem #(.WM(WM), .DEPTH(DEPTH)) u_mem (
    .clk(clk), .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .re(m_re), .raddr(m_raddr), .rdata(m_rdata)
  );

  always_comb begin
    cmd_ack = 2'b00;
    if (quick) cmd_ack[sel] = 1'b1;
    if ((st == H_RD || st == H_WR) && k == nw) cmd_ack[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= H_IDLE;
      cur      <= 1'b0;
      rr       <= 1'b0;
      cur_port <= 1'b0;
      cur_ent  <= '0;
      base     <= '0;
      k        <= '0;
      asm_q    <= '0;
      mbuf     <= '0;
      tag_vld  <= 2'b00;
      tag      <= '{default: '0};
      pe_in1   <= '{default: '0};
      pe_in2   <= '{default: '0};
      n_fetch  <= '0;
      n_store  <= '0;
      n_sync   <= '0;
      n_reuse  <= '0;
    end else begin
      // an operation start overwrites R
      for (int j = 0; j < 2; j++) if (pe_start[j]) tag_vld[j] <= 1'b0;
      if (clear_tags || host_en) tag_vld <= 2'b00;
      case (st)
        H_IDLE: if (gnt) begin
          rr       <= ~sel;
          cur      <= sel;
          cur_port <= cmd_port[sel];
          cur_ent  <= cmd_ent[sel];
          base     <= AW'(cmd_ent[sel]) * AW'(NWPE);
          asm_q    <= '0;
          if (cmd_store[sel]) begin
            mbuf <= pe_res[sel][WM-1:0];
            k    <= ($clog2(NWPE+1))'(1);
            st   <= H_WR;
          end else if (quick) begin
            if (cmd_port[sel]) pe_in2[sel] <= quick_val;
            else               pe_in1[sel] <= quick_val;
            if (cmd_ent[sel] != E_ZERO && cmd_ent[sel] != E_ONE) begin
              if (tag_vld[sel] && tag[sel] == cmd_ent[sel]) n_reuse <= n_reuse + 1'b1;
              else                                          n_sync  <= n_sync + 1'b1;
            end
          end else begin
            k  <= ($clog2(NWPE+1))'(1);
            st <= H_RD;
          end
        end
        H_RD: begin
          // word k-1 arrives from the SRAM
          if (k == nw) begin
            if (cur_port) pe_in2[cur] <= asm_q | (W'(m_rdata) << ((int'(k) - 1) * WM));
            else          pe_in1[cur] <= asm_q | (W'(m_rdata) << ((int'(k) - 1) * WM));
            n_fetch <= n_fetch + 1'b1;
            st      <= H_IDLE;
          end else begin
            asm_q <= asm_q | (W'(m_rdata) << ((int'(k) - 1) * WM));
            k     <= k + 1'b1;
          end
        end
        H_WR: begin
          if (k == nw) begin
            n_store      <= n_store + 1'b1;
            tag[cur]     <= cur_ent;
            tag_vld[cur] <= 1'b1;
            if (tag[~cur] == cur_ent) tag_vld[~cur] <= 1'b0;
            st           <= H_IDLE;
          end else begin
            mbuf <= WM'(res_sel >> (int'(k) * WM));
            k    <= k + 1'b1;
          end
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  // The host may only use the memory while no command is in service.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n) host_en |-> (st == H_IDLE && cmd_valid == 2'b00));
endmodule
