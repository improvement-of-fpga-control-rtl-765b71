// Command-list controller: executes the host's command list next to the
// controlled hardware.
//
// The host sends a whole list of simple commands in one packet; this
// controller executes them one after another on the local bus at local-bus
// speed, keeps read results in the output buffer, and only returns a
// response packet when the buffer is full, when a command fails, on SYNC, at
// the end of the list, or (standard mode, std_mode = 1) after every command.
// So the link's round-trip latency is paid once per list instead of once per
// handshake. The command set and each command's arguments, results and
// exception contents follow the concept:
//   WRITE  block write, address incremented, decremented or kept (FIFO);
//          a bus error reports the address and the data word.
//   READ   block read with the same address modes; the words go to the
//          output buffer; a bus error reports the address.
//   RMW    read, modify (Inc, Dec, Add, Sub, And, Or, Xor), write back; the
//          original value goes to the output buffer; a bus error reports the
//          address, whether the read or the write failed, and the original
//          and final values.
//   TEST   read and test (see test_unit); a bus error reports the address,
//          a failed test reports the address, the test (header word), its
//          two arguments and the value read. The register is not modified.
//   MTEST  the test repeated up to "retries" more times with "interval"
//          idle cycles between trials; on success the address, the number of
//          retries used and the final value go to the output buffer, on
//          failure the same record as TEST is reported.
//   SYNC   sends what the output buffer holds to the host.
// After an exception the record is followed by a PKT_EXC trailer carrying the
// index of the failing command, and the rest of the list is discarded.
// Encodings (ctrl_pkg), the trailer, the truncated-list and bad-command
// exceptions, the retry counting (retries = extra trials after the first)
// and the interval unit (clock cycles) are this design's choices.
//
// Interfaces: the input buffer's first-word-fall-through read port (ib_*),
// bus_master's request port (bm_*), and the output buffer's write and flush
// ports (ob_*). Timing: one cycle per header or argument word fetched, one
// decode and one setup cycle per command, then per bus access the
// bus_master's latency plus one cycle; see the README for totals.
module cmd_controller
  import ctrl_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              std_mode,
  // input buffer
  input  logic              ib_valid,
  input  logic [DATA_W-1:0] ib_data,
  input  logic              ib_last,
  output logic              ib_rd,
  // bus master
  output logic              bm_start,
  output logic              bm_we,
  output logic [ADDR_W-1:0] bm_addr,
  output logic [DATA_W-1:0] bm_wdata,
  input  logic              bm_busy,
  input  logic              bm_done,
  input  logic              bm_err,
  input  logic [DATA_W-1:0] bm_rdata,
  // output buffer
  output logic              ob_wr,
  output logic [DATA_W-1:0] ob_wdata,
  input  logic              ob_full,
  output logic              ob_flush_req,
  output pkt_kind_e         ob_flush_kind,
  output exc_e              ob_flush_exc,
  output logic [23:0]       ob_flush_index,
  input  logic              ob_flush_ack,
  output logic [23:0]       cur_index,
  // status
  output logic              busy
);

  typedef enum logic [4:0] {
    S_IDLE, S_DECODE, S_ARGS, S_SETUP,
    S_WR_DATA, S_WR_WAIT,
    S_RD, S_RD_WAIT, S_RD_PUSH,
    S_RMW_RD, S_RMW_RWAIT, S_RMW_WR, S_RMW_WWAIT, S_RMW_PUSH,
    S_T_RD, S_T_WAIT, S_T_EVAL, S_T_DELAY,
    S_REC, S_CMD_END, S_FLUSH, S_ADV, S_DISCARD
  } state_e;

  localparam int unsigned NARG = 5;
  localparam int unsigned NREC = 5;

  state_e            state, fl_next;
  cmd_hdr_t          hdr;
  logic              list_end;
  logic [23:0]       cmd_index;
  logic [DATA_W-1:0] arg_q [NARG];
  logic [2:0]        arg_i, nargs;
  logic              hdr_ok;
  logic [ADDR_W-1:0] addr;
  logic [15:0]       remaining;
  logic [DATA_W-1:0] wdata_q, data_q, orig_q, fin_q;
  logic [DATA_W-1:0] op0, op1;
  logic [DATA_W-1:0] tries_left, retry_cnt, interval, timer;
  logic [DATA_W-1:0] rec [NREC];
  logic [2:0]        rec_i, rec_n;
  logic              rec_exc;
  exc_e              exc_q;
  pkt_kind_e         fl_kind;
  logic [23:0]       fl_index;

  logic [DATA_W-1:0] alu_res;
  logic              t_pass;

  rmw_alu #(.W(DATA_W)) u_alu (
    .op     (alu_op_e'(hdr.sub)),
    .orig   (orig_q),
    .arg    (op0),
    .result (alu_res)
  );

  test_unit #(.W(DATA_W)) u_test (
    .op    (test_op_e'(hdr.sub)),
    .value (data_q),
    .arg0  (op0),
    .arg1  (op1),
    .pass  (t_pass)
  );

  // Number of argument words that follow the header, and whether the
  // header names a known command and sub-operation.
  always_comb begin
    nargs  = 3'd0;
    hdr_ok = 1'b1;
    unique case (hdr.op)
      OP_WRITE, OP_READ: begin
        nargs  = 3'd1;
        hdr_ok = (hdr.sub <= 4'(AM_KEEP));
      end
      OP_RMW: begin
        nargs  = (hdr.sub == 4'(ALU_INC) || hdr.sub == 4'(ALU_DEC)) ? 3'd1 : 3'd2;
        hdr_ok = (hdr.sub <= 4'(ALU_XOR));
      end
      OP_TEST, OP_MTEST: begin
        nargs  = (hdr.sub == 4'(T_ANDEQ) || hdr.sub == 4'(T_OREQ)) ? 3'd3 : 3'd2;
        if (hdr.op == OP_MTEST) nargs = nargs + 3'd2;
        hdr_ok = (hdr.sub <= 4'(T_OREQ));
      end
      OP_SYNC: nargs = 3'd0;
      default: hdr_ok = 1'b0;
    endcase
  end

  function automatic logic [ADDR_W-1:0] step(logic [ADDR_W-1:0] a, logic [3:0] m);
    unique case (m)
      4'(AM_INC): return a + ADDR_W'(1);
      4'(AM_DEC): return a - ADDR_W'(1);
      default:    return a;
    endcase
  endfunction

  // Combinational handshakes towards the buffers and the bus master.
  always_comb begin
    ib_rd    = 1'b0;
    bm_start = 1'b0;
    bm_we    = 1'b0;
    bm_addr  = addr;
    bm_wdata = fin_q;
    ob_wr    = 1'b0;
    ob_wdata = data_q;
    unique case (state)
      S_IDLE:    ib_rd = ib_valid;
      S_ARGS:    ib_rd = ib_valid;
      S_DISCARD: ib_rd = ib_valid && !list_end;
      S_WR_DATA: begin
        ib_rd    = ib_valid && !list_end && !bm_busy;
        bm_start = ib_rd;
        bm_we    = 1'b1;
        bm_wdata = ib_data;
      end
      S_RD, S_RMW_RD, S_T_RD: bm_start = !bm_busy;
      S_RMW_WR: begin
        bm_start = !bm_busy;
        bm_we    = 1'b1;
        bm_wdata = alu_res;
      end
      S_RD_PUSH: ob_wr = !ob_full;
      S_RMW_PUSH: begin
        ob_wr    = !ob_full;
        ob_wdata = orig_q;
      end
      S_REC: begin
        ob_wr    = !ob_full;
        ob_wdata = rec[rec_i];
      end
      default: ;
    endcase
  end

  assign ob_flush_req   = (state == S_FLUSH);
  assign ob_flush_kind  = fl_kind;
  assign ob_flush_exc   = exc_q;
  assign ob_flush_index = fl_index;
  assign cur_index      = cmd_index;
  assign busy           = (state != S_IDLE);

  // Start an exception: load its record and send it, then flush and discard.
  task automatic raise(exc_e code, logic [2:0] n,
                       logic [DATA_W-1:0] w0, logic [DATA_W-1:0] w1,
                       logic [DATA_W-1:0] w2, logic [DATA_W-1:0] w3,
                       logic [DATA_W-1:0] w4);
    exc_q   <= code;
    rec[0]  <= w0;
    rec[1]  <= w1;
    rec[2]  <= w2;
    rec[3]  <= w3;
    rec[4]  <= w4;
    rec_n   <= n;
    rec_i   <= '0;
    rec_exc <= 1'b1;
    state   <= S_REC;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      fl_next    <= S_IDLE;
      hdr        <= '0;
      list_end   <= 1'b0;
      cmd_index  <= '0;
      arg_i      <= '0;
      addr       <= '0;
      remaining  <= '0;
      wdata_q    <= '0;
      data_q     <= '0;
      orig_q     <= '0;
      fin_q      <= '0;
      op0        <= '0;
      op1        <= '0;
      tries_left <= '0;
      retry_cnt  <= '0;
      interval   <= '0;
      timer      <= '0;
      rec_i      <= '0;
      rec_n      <= '0;
      rec_exc    <= 1'b0;
      exc_q      <= EXC_NONE;
      fl_kind    <= PKT_DONE;
      fl_index   <= '0;
      for (int i = 0; i < NARG; i++) arg_q[i] <= '0;
      for (int i = 0; i < NREC; i++) rec[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (ib_valid) begin
          hdr      <= cmd_hdr_t'(ib_data);
          list_end <= ib_last;
          exc_q    <= EXC_NONE;
          arg_i    <= '0;
          for (int i = 0; i < NARG; i++) arg_q[i] <= '0;
          state    <= S_DECODE;
        end

        S_DECODE: begin
          if (!hdr_ok) begin
            raise(EXC_BAD_CMD, 3'd1, DATA_W'(hdr), '0, '0, '0, '0);
          end else if (hdr.op == OP_SYNC) begin
            fl_kind  <= PKT_SYNC;
            fl_index <= cmd_index;
            fl_next  <= S_CMD_END;
            state    <= S_FLUSH;
          end else if (list_end) begin
            raise(EXC_TRUNC, 3'd1, DATA_W'(hdr), '0, '0, '0, '0);
          end else begin
            state <= S_ARGS;
          end
        end

        S_ARGS: if (ib_valid) begin
          arg_q[arg_i] <= ib_data;
          arg_i        <= arg_i + 3'd1;
          list_end     <= ib_last;
          if (arg_i == nargs - 3'd1) state <= S_SETUP;
          else if (ib_last) raise(EXC_TRUNC, 3'd1, DATA_W'(hdr), '0, '0, '0, '0);
        end

        S_SETUP: begin
          remaining  <= hdr.len;
          retry_cnt  <= '0;
          tries_left <= '0;
          unique case (hdr.op)
            OP_WRITE: begin
              addr  <= arg_q[0];
              state <= (hdr.len == '0) ? S_CMD_END : S_WR_DATA;
            end
            OP_READ: begin
              addr  <= arg_q[0];
              state <= (hdr.len == '0) ? S_CMD_END : S_RD;
            end
            OP_RMW: begin
              addr  <= arg_q[0];
              op0   <= arg_q[1];
              state <= S_RMW_RD;
            end
            OP_TEST: begin
              addr  <= arg_q[0];
              op0   <= arg_q[1];
              op1   <= arg_q[2];
              state <= S_T_RD;
            end
            default: begin  // OP_MTEST
              tries_left <= arg_q[0];
              interval   <= arg_q[1];
              addr       <= arg_q[2];
              op0        <= arg_q[3];
              op1        <= arg_q[4];
              state      <= S_T_RD;
            end
          endcase
        end

        // ---------------- WRITE ----------------
        S_WR_DATA: begin
          if (list_end) raise(EXC_TRUNC, 3'd1, DATA_W'(hdr), '0, '0, '0, '0);
          else if (ib_rd) begin
            wdata_q  <= ib_data;
            list_end <= ib_last;
            state    <= S_WR_WAIT;
          end
        end
        S_WR_WAIT: if (bm_done) begin
          if (bm_err) raise(EXC_WR_BUS, 3'd2, addr, wdata_q, '0, '0, '0);
          else begin
            addr      <= step(addr, hdr.sub);
            remaining <= remaining - 16'd1;
            state     <= (remaining == 16'd1) ? S_CMD_END : S_WR_DATA;
          end
        end

        // ---------------- READ ----------------
        S_RD: if (bm_start) state <= S_RD_WAIT;
        S_RD_WAIT: if (bm_done) begin
          if (bm_err) raise(EXC_RD_BUS, 3'd1, addr, '0, '0, '0, '0);
          else begin
            data_q <= bm_rdata;
            state  <= S_RD_PUSH;
          end
        end
        S_RD_PUSH: if (ob_wr) begin
          addr      <= step(addr, hdr.sub);
          remaining <= remaining - 16'd1;
          state     <= (remaining == 16'd1) ? S_CMD_END : S_RD;
        end

        // ---------------- RMW ----------------
        S_RMW_RD: if (bm_start) state <= S_RMW_RWAIT;
        S_RMW_RWAIT: if (bm_done) begin
          if (bm_err) raise(EXC_RMW_RD_BUS, 3'd3, addr, '0, '0, '0, '0);
          else begin
            orig_q <= bm_rdata;
            state  <= S_RMW_WR;
          end
        end
        S_RMW_WR: if (bm_start) begin
          fin_q <= alu_res;
          state <= S_RMW_WWAIT;
        end
        S_RMW_WWAIT: if (bm_done) begin
          if (bm_err) raise(EXC_RMW_WR_BUS, 3'd3, addr, orig_q, fin_q, '0, '0);
          else state <= S_RMW_PUSH;
        end
        S_RMW_PUSH: if (ob_wr) state <= S_CMD_END;

        // ---------------- TEST / MTEST ----------------
        S_T_RD: if (bm_start) state <= S_T_WAIT;
        S_T_WAIT: if (bm_done) begin
          if (bm_err) raise(EXC_RD_BUS, 3'd1, addr, '0, '0, '0, '0);
          else begin
            data_q <= bm_rdata;
            state  <= S_T_EVAL;
          end
        end
        S_T_EVAL: begin
          if (t_pass) begin
            if (hdr.op == OP_MTEST) begin
              rec[0]  <= addr;
              rec[1]  <= retry_cnt;
              rec[2]  <= data_q;
              rec_n   <= 3'd3;
              rec_i   <= '0;
              rec_exc <= 1'b0;
              state   <= S_REC;
            end else begin
              state <= S_CMD_END;
            end
          end else if (tries_left != '0) begin
            tries_left <= tries_left - DATA_W'(1);
            retry_cnt  <= retry_cnt + DATA_W'(1);
            timer      <= interval;
            state      <= S_T_DELAY;
          end else begin
            raise((hdr.op == OP_MTEST) ? EXC_MTEST_FAIL : EXC_TEST_FAIL, 3'd5,
                  addr, DATA_W'(hdr), op0, op1, data_q);
          end
        end
        S_T_DELAY: begin
          if (timer == '0) state <= S_T_RD;
          else timer <= timer - DATA_W'(1);
        end

        // ---------------- records, flushes, list control ----------------
        S_REC: if (ob_wr) begin
          rec_i <= rec_i + 3'd1;
          if (rec_i == rec_n - 3'd1) begin
            if (rec_exc) begin
              fl_kind  <= PKT_EXC;
              fl_index <= cmd_index;
              fl_next  <= S_DISCARD;
              state    <= S_FLUSH;
            end else begin
              state <= S_CMD_END;
            end
          end
        end

        S_CMD_END: begin
          if (list_end) begin
            fl_kind  <= PKT_DONE;
            fl_index <= cmd_index + 24'd1;
            fl_next  <= S_ADV;
            state    <= S_FLUSH;
          end else if (std_mode && hdr.op != OP_SYNC) begin
            fl_kind  <= PKT_CMD;
            fl_index <= cmd_index;
            fl_next  <= S_ADV;
            state    <= S_FLUSH;
          end else begin
            state <= S_ADV;
          end
        end

        S_FLUSH: if (ob_flush_ack) state <= fl_next;

        S_ADV: begin
          cmd_index <= list_end ? '0 : cmd_index + 24'd1;
          state     <= S_IDLE;
        end

        S_DISCARD: begin
          if (list_end) begin
            cmd_index <= '0;
            state     <= S_IDLE;
          end else if (ib_rd) begin
            list_end <= ib_last;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A bus access is started only while the bus master is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 bm_start |-> !bm_busy);
  // Never write to a full output buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  ob_wr |-> !ob_full);

endmodule
