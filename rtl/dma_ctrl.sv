// dma_ctrl: eight-channel DMA and HDMA engine with its 0x43xx registers.
//
// Each channel n has the console's register set at 0x43n0-0x43nA: transfer
// control (DMAP: direction, address step, transfer mode), B-bus register
// (BBAD, offset into 0x21xx), A-bus address (A1T low/high and bank), byte
// count (DAS), HDMA table address (A2A) and HDMA line counter (NLTR).
// Writing 0x420B starts general-purpose DMA on the channels whose bits are
// set; 0x420C selects the channels that run HDMA.
//
// The engine is a bus master on the same bus as the CPU. While it has work
// (`busy`) the CPU is held off the bus. Every byte is moved with two bus
// accesses: a read from the source and a write to the destination. A DMA
// channel moves DAS bytes from the A-bus address (incrementing, decrementing
// or fixed) to BBAD plus the offset pattern of its mode (modes 0-4: 1, 2,
// 2 same, 4 as two pairs, 4 consecutive registers), lowest channel first.
// The engine updates A1T and DAS in the CPU-visible registers as it goes,
// so a later CPU access sees the progress and no update is lost.
//
// HDMA runs only in blanking. At the frame strobe each enabled channel
// loads A2A from A1T and reads its first line-count byte. At each line
// strobe (end of a game line) each live channel sends one unit from its
// table if due, then counts down the line counter; bit 7 of the count byte
// repeats the transfer on every line of the entry, a count of zero ends the
// channel for the frame. HDMA takes precedence: a pending HDMA step runs at
// the next byte boundary of a general DMA, which then resumes.
// Indirect HDMA and the B-to-A direction for HDMA are not supported.
module dma_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  // register port
  input  logic        stb,
  input  logic        we,
  input  logic [15:0] addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  // blanking strobes
  input  logic        hdma_init,
  input  logic        hdma_line,
  // bus master
  output logic        m_req,
  output logic        m_we,
  output logic [23:0] m_addr,
  output logic [7:0]  m_wdata,
  input  logic        m_ack,
  input  logic [7:0]  m_rdata,
  output logic        busy,
  output logic        dma_byte_stb,    // one clock per DMA byte moved
  output logic        hdma_byte_stb    // one clock per HDMA byte moved
);
  logic [7:0][7:0]  dmap, bbad, a1b, nltr;
  logic [7:0][15:0] a1t, das, a2a;
  logic [7:0]       mdmaen, hdmaen, do_xfer, term, init_todo, line_todo;
  logic             init_pend, line_pend;

  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR} state_e;
  typedef enum logic [1:0] {OP_DMA, OP_HX, OP_HC} op_e;
  state_e     st;
  op_e        op;
  logic [2:0] ch;
  logic [1:0] k, dk;   // byte within the unit: HDMA, general DMA
  logic [7:0] data;

  function automatic logic [2:0] first_set(input logic [7:0] m);
    for (int i = 0; i < 8; i++) if (m[i]) return 3'(i);
    return 3'd0;
  endfunction

  // bytes per unit and B-register offset for byte k of a unit
  function automatic logic [1:0] unit_last(input logic [2:0] mode);
    unique case (mode)
      3'd0:             return 2'd0;
      3'd1, 3'd2, 3'd6: return 2'd1;
      default:          return 2'd3;
    endcase
  endfunction
  function automatic logic [7:0] b_off(input logic [2:0] mode, input logic [1:0] kk);
    unique case (mode)
      3'd1, 3'd4: return 8'(kk);
      3'd3, 3'd7: return 8'(kk[1]);
      3'd5:       return 8'(kk[0]);
      default:    return 8'd0;
    endcase
  endfunction

  logic [23:0] a_addr, b_addr;
  always_comb begin
    b_addr = {16'h0021, bbad[ch] + b_off(dmap[ch][2:0], (op == OP_DMA) ? dk : k)};
    a_addr = (op == OP_DMA) ? {a1b[ch], a1t[ch]} : {a1b[ch], a2a[ch]};
    m_req   = (st != S_IDLE);
    m_we    = (st == S_WR);
    m_wdata = data;
    if (op == OP_DMA && dmap[ch][7]) m_addr = (st == S_RD) ? b_addr : a_addr;  // B to A
    else                             m_addr = (st == S_RD) ? a_addr : b_addr;  // A to B
    busy = (st != S_IDLE) || (mdmaen != 0) || init_pend || line_pend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dmap <= '0; bbad <= '0; a1b <= '0; nltr <= '0; a1t <= '0; das <= '0; a2a <= '0;
      mdmaen <= '0; hdmaen <= '0; do_xfer <= '0; term <= '0; init_todo <= '0; line_todo <= '0;
      init_pend <= 1'b0; line_pend <= 1'b0; st <= S_IDLE; op <= OP_DMA; ch <= '0; k <= '0; dk <= '0;
      data <= '0; rdata <= '0; dma_byte_stb <= 1'b0; hdma_byte_stb <= 1'b0;
    end else begin
      dma_byte_stb  <= 1'b0;
      hdma_byte_stb <= 1'b0;
      // ---- blanking strobes ----
      if (hdma_init && hdmaen != 0) begin
        init_pend <= 1'b1; init_todo <= hdmaen; term <= ~hdmaen; do_xfer <= '0;
      end
      if (hdma_line && (hdmaen & ~term) != 0) begin
        line_pend <= 1'b1; line_todo <= hdmaen & ~term;
      end
      // ---- CPU register access (the CPU is off the bus while busy) ----
      if (stb && we) begin
        if (addr == 16'h420B) mdmaen <= wdata;
        else if (addr == 16'h420C) hdmaen <= wdata;
        else if (addr[15:8] == 8'h43) begin
          unique case (addr[3:0])
            4'h0: dmap[addr[6:4]] <= wdata;
            4'h1: bbad[addr[6:4]] <= wdata;
            4'h2: a1t[addr[6:4]][7:0]  <= wdata;
            4'h3: a1t[addr[6:4]][15:8] <= wdata;
            4'h4: a1b[addr[6:4]] <= wdata;
            4'h5: das[addr[6:4]][7:0]  <= wdata;
            4'h6: das[addr[6:4]][15:8] <= wdata;
            4'h8: a2a[addr[6:4]][7:0]  <= wdata;
            4'h9: a2a[addr[6:4]][15:8] <= wdata;
            4'hA: nltr[addr[6:4]] <= wdata;
            default: ;
          endcase
        end
      end else if (stb) begin
        unique case (addr[3:0])
          4'h0: rdata <= dmap[addr[6:4]];
          4'h1: rdata <= bbad[addr[6:4]];
          4'h2: rdata <= a1t[addr[6:4]][7:0];
          4'h3: rdata <= a1t[addr[6:4]][15:8];
          4'h4: rdata <= a1b[addr[6:4]];
          4'h5: rdata <= das[addr[6:4]][7:0];
          4'h6: rdata <= das[addr[6:4]][15:8];
          4'h8: rdata <= a2a[addr[6:4]][7:0];
          4'h9: rdata <= a2a[addr[6:4]][15:8];
          4'hA: rdata <= nltr[addr[6:4]];
          default: rdata <= 8'h00;
        endcase
      end
      // ---- transfer engine ----
      unique case (st)
        S_IDLE: begin
          if (init_pend) begin
            if (init_todo == 0) init_pend <= 1'b0;
            else begin
              ch <= first_set(init_todo);
              a2a[first_set(init_todo)] <= a1t[first_set(init_todo)];
              op <= OP_HC; st <= S_RD;
            end
          end else if (line_pend) begin
            if (line_todo == 0) line_pend <= 1'b0;
            else begin
              ch <= first_set(line_todo); k <= '0;
              if (do_xfer[first_set(line_todo)]) begin
                op <= OP_HX; st <= S_RD;
              end else begin
                // no unit this line: count down only
                line_todo[first_set(line_todo)] <= 1'b0;
                nltr[first_set(line_todo)][6:0] <= nltr[first_set(line_todo)][6:0] - 1'b1;
                if (nltr[first_set(line_todo)][6:0] == 7'd1) begin
                  op <= OP_HC; st <= S_RD;
                end
              end
            end
          end else if (mdmaen != 0) begin
            ch <= first_set(mdmaen); op <= OP_DMA; st <= S_RD;
          end
        end
        S_RD: if (m_ack) begin
          if (op == OP_HC) begin
            nltr[ch] <= m_rdata;
            a2a[ch]  <= a2a[ch] + 1'b1;
            init_todo[ch] <= 1'b0;
            line_todo[ch] <= 1'b0;
            do_xfer[ch] <= 1'b1;
            if (m_rdata == 8'h00) term[ch] <= 1'b1;
            st <= S_IDLE;
          end else begin
            data <= m_rdata; st <= S_WR;
          end
        end
        S_WR: if (m_ack) begin
          if (op == OP_DMA) begin
            dma_byte_stb <= 1'b1;
            if (!dmap[ch][3]) a1t[ch] <= dmap[ch][4] ? a1t[ch] - 1'b1 : a1t[ch] + 1'b1;
            das[ch] <= das[ch] - 1'b1;
            dk <= (dk == unit_last(dmap[ch][2:0])) ? 2'd0 : dk + 1'b1;
            if (das[ch] == 16'd1) begin
              mdmaen[ch] <= 1'b0; dk <= '0;
            end
            st <= S_IDLE;
          end else begin
            hdma_byte_stb <= 1'b1;
            a2a[ch] <= a2a[ch] + 1'b1;
            if (k == unit_last(dmap[ch][2:0])) begin
              // unit sent: count down this entry
              k <= '0;
              line_todo[ch] <= 1'b0;
              do_xfer[ch] <= nltr[ch][7];
              nltr[ch][6:0] <= nltr[ch][6:0] - 1'b1;
              if (nltr[ch][6:0] == 7'd1) begin
                op <= OP_HC; st <= S_RD;
              end else st <= S_IDLE;
            end else begin
              k <= k + 1'b1; st <= S_RD;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
