// central_controller: the global state machine that sequences the datapath.
//
// It accepts one command at a time (valid/ready handshake) and, while it runs
// it, produces every cycle
//   - the state for the configuration unit (operation, bank, step),
//   - read addresses for the input buffer, the result RAM and the ROM,
//   - delayed write strobes and addresses for the result RAM.
// Commands:
//   OP_LOAD  17 cycles: coefficients from ROM into the tiles, state cleared.
//   OP_HB    2 cycles per complex input sample; output written to
//            dst_base + i, or with decim to dst_base + i/2 for even i.
//   OP_MF    4 cycles per complex input sample; output to dst_base + i.
//   OP_FFT   64-point radix-2 DIF FFT: 6 stages of 32 butterflies, one
//            butterfly per cycle, 4 idle cycles between stages so the last
//            results of a stage are in RAM before the next stage reads them.
//            Stage 0 reads the input buffer at src_base; stages ping-pong
//            through RAM words 128..191 and 192..255; stage 5 writes the
//            result in natural order (bit-reversed addresses) at dst_base.
// FIR commands read from the input buffer, or with src_ram from the RAM, so a
// halfband output can feed the matched filter. count = 0 means 256 samples.
// After the last issue the controller drains the pipeline for 4 cycles, pulses
// done and is ready again: switching between operations (and so between the
// two standards) costs a few cycles only, and the filter state kept in the
// tiles survives the switch.
// Timing relative to issue cycle c: memories are read at c and their data is
// on the buses at c+1, when the tiles execute the control word; twiddles are
// read at c+1 for the bottom row at c+2; write port 0 writes at c+2 (FIR
// output, butterfly sum), write port 1 at c+4 (butterfly difference product).
// The document asks for a state machine that reconfigures the datapath within
// a few cycles; the command set, addressing and timing are this design's.
module central_controller
  import sdr_pkg::*;
#(
  parameter int          AW        = 8,
  parameter logic [7:0]  SCR0      = 8'd128,
  parameter logic [7:0]  SCR1      = 8'd192,
  parameter int          STAGE_GAP = 4,
  parameter int          DRAIN     = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  input  cmd_t          cmd,
  output logic          cmd_ready,
  output logic          st_valid,
  output ctl_state_t    st,
  output logic [AW-1:0] ibuf_raddr0,
  output logic [AW-1:0] ibuf_raddr1,
  output logic [AW-1:0] ram_raddr0,
  output logic [AW-1:0] ram_raddr1,
  output logic          bus_from_ram,
  output logic [5:0]    rom_addr,
  output logic          we0,
  output logic [AW-1:0] waddr0,
  output wsel_e         wsel0,
  output logic          cap_re,
  output logic          we1,
  output logic [AW-1:0] waddr1,
  output op_e           cur_op,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  typedef struct packed {
    logic          we;
    logic [AW-1:0] addr;
    wsel_e         sel;
    logic          cap;
  } wev_t;

  state_e     state;
  cmd_t       c_q;
  logic [4:0] step;
  logic [7:0] idx;
  logic [2:0] stage;
  logic [4:0] bf;
  logic [2:0] gap;
  logic [2:0] drain;
  logic [4:0] tw_q;

  logic          issue;
  logic [5:0]    fp, fq;
  logic [4:0]    tw;
  logic [AW-1:0] rd0, rd1, dp, dq;
  logic          rd_ram;
  wev_t          ev_now;
  logic          ev1_now;
  logic [AW-1:0] ev1_addr;
  wev_t          ev2_d [2];
  logic          ev4_we [4];
  logic [AW-1:0] ev4_a  [4];

  function automatic logic [5:0] bitrev6(input logic [5:0] v);
    for (int i = 0; i < 6; i++) bitrev6[i] = v[5-i];
  endfunction

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign cur_op    = (state == S_IDLE) ? OP_IDLE : c_q.op;
  assign issue     = (state == S_RUN) && (gap == 3'd0);

  // butterfly addressing: span h = 32 >> stage
  always_comb begin
    logic [4:0] off, grp;
    logic [5:0] h;
    h   = 6'd32 >> stage;
    off = bf & 5'(h - 6'd1);
    grp = bf >> (3'd5 - stage);
    fp  = 6'((6'(grp) << (3'd6 - stage)) | 6'(off));
    fq  = fp + h;
    tw  = 5'(off << stage);
  end

  always_comb begin
    rd0 = '0; rd1 = '0; dp = '0; dq = '0; rd_ram = 1'b0;
    ev_now = '0; ev1_now = 1'b0; ev1_addr = '0;
    unique case (c_q.op)
      OP_HB, OP_MF: begin
        rd0    = c_q.src_base + AW'(idx);
        rd1    = rd0;
        rd_ram = c_q.src_ram;
        if (c_q.op == OP_HB && step == 5'd1) begin
          ev_now.we   = !c_q.decim || !idx[0];
          ev_now.addr = c_q.dst_base + AW'(c_q.decim ? idx >> 1 : idx);
          ev_now.sel  = WSEL_HB;
        end
        if (c_q.op == OP_MF && step == 5'd1) ev_now.cap = 1'b1;
        if (c_q.op == OP_MF && step == 5'd3) begin
          ev_now.we   = 1'b1;
          ev_now.addr = c_q.dst_base + AW'(idx);
          ev_now.sel  = WSEL_MF;
        end
      end
      OP_FFT: begin
        rd_ram = (stage != 3'd0);
        if (stage == 3'd0) begin
          rd0 = c_q.src_base + AW'(fp);
          rd1 = c_q.src_base + AW'(fq);
        end else begin
          rd0 = (stage[0] ? SCR0 : SCR1) + AW'(fp);
          rd1 = (stage[0] ? SCR0 : SCR1) + AW'(fq);
        end
        if (stage == 3'd5) begin
          dp = c_q.dst_base + AW'(bitrev6(fp));
          dq = c_q.dst_base + AW'(bitrev6(fq));
        end else begin
          dp = (stage[0] ? SCR1 : SCR0) + AW'(fp);
          dq = (stage[0] ? SCR1 : SCR0) + AW'(fq);
        end
        ev_now.we   = 1'b1;
        ev_now.addr = dp;
        ev_now.sel  = WSEL_FFT;
        ev1_now     = 1'b1;
        ev1_addr    = dq;
      end
      default: ;
    endcase
    if (!issue) begin
      ev_now  = '0;
      ev1_now = 1'b0;
    end
  end

  assign ibuf_raddr0 = rd0;
  assign ibuf_raddr1 = rd1;
  assign ram_raddr0  = rd0;
  assign ram_raddr1  = rd1;

  assign st_valid = (state == S_RUN) || (state == S_DRAIN && c_q.op == OP_FFT);
  assign st       = '{op: c_q.op, bank: c_q.bank, step: step};

  always_comb begin
    if (c_q.op == OP_FFT)          rom_addr = 6'(ROM_TW_BASE) + 6'(tw_q);
    else if (step < 5'd4)          rom_addr = 6'(ROM_HB_BASE) + 6'(step);
    else                           rom_addr = 6'(ROM_MF_BASE) + 6'(step - 5'd4);
  end

  assign we0    = ev2_d[1].we;
  assign waddr0 = ev2_d[1].addr;
  assign wsel0  = ev2_d[1].sel;
  assign cap_re = ev2_d[1].cap;
  assign we1    = ev4_we[3];
  assign waddr1 = ev4_a[3];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ev2_d[0]     <= '0;
      ev2_d[1]     <= '0;
      ev4_we       <= '{default: 1'b0};
      ev4_a        <= '{default: '0};
      tw_q         <= '0;
      bus_from_ram <= 1'b0;
    end else begin
      ev2_d[0]     <= ev_now;
      ev2_d[1]     <= ev2_d[0];
      ev4_we[0]    <= ev1_now;
      ev4_a[0]     <= ev1_addr;
      for (int i = 1; i < 4; i++) begin
        ev4_we[i] <= ev4_we[i-1];
        ev4_a[i]  <= ev4_a[i-1];
      end
      tw_q         <= tw;
      bus_from_ram <= rd_ram;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      c_q   <= '0;
      step  <= '0;
      idx   <= '0;
      stage <= '0;
      bf    <= '0;
      gap   <= '0;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (cmd_valid) begin
            c_q   <= cmd;
            step  <= '0;
            idx   <= '0;
            stage <= '0;
            bf    <= '0;
            gap   <= '0;
            state <= (cmd.op == OP_IDLE) ? S_IDLE : S_RUN;
          end
        S_RUN:
          unique case (c_q.op)
            OP_LOAD:
              if (step == 5'd16) begin
                state <= S_DRAIN;
                drain <= 3'(DRAIN - 1);
              end else step <= step + 5'd1;
            OP_HB, OP_MF:
              if (step == ((c_q.op == OP_HB) ? 5'd1 : 5'd3)) begin
                step <= '0;
                if (idx == c_q.count - 8'd1) begin
                  state <= S_DRAIN;
                  drain <= 3'(DRAIN - 1);
                end else idx <= idx + 8'd1;
              end else step <= step + 5'd1;
            OP_FFT:
              if (gap != 3'd0) gap <= gap - 3'd1;
              else if (bf == 5'd31) begin
                bf <= '0;
                if (stage == 3'(FFT_LOG2N - 1)) begin
                  state <= S_DRAIN;
                  drain <= 3'(DRAIN - 1);
                end else begin
                  stage <= stage + 3'd1;
                  gap   <= 3'(STAGE_GAP);
                end
              end else bf <= bf + 5'd1;
            default: state <= S_DRAIN;
          endcase
        S_DRAIN:
          if (drain == 3'd0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else drain <= drain - 3'd1;
        default: state <= S_IDLE;
      endcase
    end

  // Run-time checks, evaluated only while reset is released:
  //  - a taken command is running in the next cycle;
  //  - done only follows a running command and leaves the controller idle;
  //  - FFT writes of a middle stage never go to that stage's source region.
  logic chk_take_q, chk_busy_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      chk_take_q <= 1'b0;
      chk_busy_q <= 1'b0;
    end else begin
      chk_take_q <= cmd_valid && cmd_ready && cmd.op != OP_IDLE;
      chk_busy_q <= busy;
      a_cmd_starts: assert (!chk_take_q || busy);
      a_done_idle: assert (!done || (!busy && chk_busy_q));
      a_no_fft_overwrite: assert (!(issue && c_q.op == OP_FFT && stage != 3'd0
                                    && stage != 3'd5)
                                  || ev_now.addr[AW-1:6] != rd0[AW-1:6]);
    end

endmodule
