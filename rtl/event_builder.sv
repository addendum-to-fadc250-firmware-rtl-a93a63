// event_builder: turns the channel results of one trigger into data words.
//
// For every event it writes, one 32-bit word per clock while dout_ready is
// high (valid/ready handshake):
//   - a block header before the first event of a block,
//   - an event header (type 2: slot or data-type field, 10-bit trigger time,
//     12-bit event number); with hdr_suppress set only the first event of a
//     block carries one, so the block still starts with an event header that
//     lets the readout check that modules in different slots are in step,
//   - for each channel 0..15, in mode 10 only, the raw window (type 4 header
//     and two samples per word, read from the channel buffer one per clock
//     through raw_idx),
//   - for each channel with pulses, a type 9 hit header (relative event number
//     in the block, channel, pedestal quality and 14-bit pedestal sum) and an
//     integral word and a time word per pulse,
//   - a block trailer with the word count of the block after block_level events.
// `start` begins an event (evnum, ttime and results must then be stable until
// `done`, a one-clock pulse after the last word).
// The event header layouts, header suppression, the type 9 words, mode 9/10
// and the word order follow the firmware addendum.  Block
// header and trailer layout, the raw window words, the relative event number
// counting from 1, and block_level 0 meaning 256 are this design's choices.
module event_builder
  import fadc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  fadc_cfg_t              cfg,
  input  logic                   start,
  input  logic [11:0]            evnum,
  input  logic [9:0]             ttime,
  input  chan_result_t [NCH-1:0] res,
  output logic [9:0]             raw_idx,
  input  sample_t [NCH-1:0]      raw_sample,
  output logic [31:0]            dout,
  output logic                   dout_valid,
  input  logic                   dout_ready,
  output logic                   busy,
  output logic                   done
);

  typedef enum logic [3:0] {
    B_IDLE, B_BHDR, B_EHDR, B_CH, B_RAWH, B_RAWA, B_RAWB, B_HIT,
    B_PINT, B_PTIME, B_NEXT, B_BTRL, B_DONE
  } bstate_t;

  bstate_t      st;
  logic [3:0]   ch;
  logic [1:0]   pk;
  logic [8:0]   evt_in_blk;
  logic [9:0]   block_num;
  logic [21:0]  nwords;
  sample_t      raw_a;

  logic [8:0]   blk_len;
  logic [9:0]   ptw_eff;
  logic         emit;

  always_comb begin
    blk_len = (cfg.block_level == 8'd0) ? 9'd256 : {1'b0, cfg.block_level};
    if (cfg.ptw == 10'd0)               ptw_eff = 10'd1;
    else if (cfg.ptw > 10'(WIN_MAX))    ptw_eff = 10'(WIN_MAX);
    else                                ptw_eff = cfg.ptw;
  end

  // word of the current state
  always_comb begin
    dout_valid = 1'b0;
    dout       = '0;
    unique case (st)
      B_BHDR:  begin dout_valid = 1'b1; dout = w_block_header(cfg.slot, block_num, cfg.block_level); end
      B_EHDR:  begin
                 dout_valid = !cfg.hdr_suppress || evt_in_blk == 9'd0;
                 dout = w_event_header(cfg, ttime, evnum);
               end
      B_RAWH:  begin dout_valid = 1'b1; dout = w_raw_header(ch, ptw_eff); end
      B_RAWB:  begin
                 dout_valid = 1'b1;
                 dout = w_raw_data(raw_a, raw_sample[ch], raw_idx < ptw_eff);
               end
      B_HIT:   begin
                 dout_valid = res[ch].npulse != 2'd0;
                 dout = w_hit_header(8'(evt_in_blk + 9'd1), ch, res[ch].pq, res[ch].ped);
               end
      B_PINT:  begin dout_valid = 1'b1; dout = w_integral(res[ch].p[pk]); end
      B_PTIME: begin dout_valid = 1'b1; dout = w_time(res[ch].p[pk]); end
      B_BTRL:  begin dout_valid = 1'b1; dout = w_block_trailer(cfg.slot, nwords + 22'd1); end
      default: ;
    endcase
    emit = dout_valid && dout_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= B_IDLE;
      ch         <= '0;
      pk         <= '0;
      evt_in_blk <= '0;
      block_num  <= 10'd1;
      nwords     <= '0;
      raw_idx    <= '0;
      raw_a      <= '0;
    end else begin
      if (emit) nwords <= nwords + 22'd1;
      unique case (st)
        B_IDLE:  if (start) st <= (evt_in_blk == 9'd0) ? B_BHDR : B_EHDR;
        B_BHDR:  if (emit) st <= B_EHDR;
        B_EHDR:  if (emit || !dout_valid) begin ch <= '0; st <= B_CH; end
        B_CH:    st <= cfg.mode10 ? B_RAWH : B_HIT;
        B_RAWH:  if (emit) begin raw_idx <= '0; st <= B_RAWA; end
        B_RAWA:  begin
                   raw_a   <= raw_sample[ch];
                   raw_idx <= raw_idx + 10'd1;
                   st      <= B_RAWB;
                 end
        B_RAWB:  if (emit) begin
                   if (raw_idx + 10'd1 >= ptw_eff) st <= B_HIT;
                   else begin
                     raw_idx <= raw_idx + 10'd1;
                     st      <= B_RAWA;
                   end
                 end
        B_HIT:   if (!dout_valid) st <= B_NEXT;
                 else if (emit) begin pk <= '0; st <= B_PINT; end
        B_PINT:  if (emit) st <= B_PTIME;
        B_PTIME: if (emit) begin
                   if (pk + 2'd1 >= res[ch].npulse) st <= B_NEXT;
                   else begin
                     pk <= pk + 2'd1;
                     st <= B_PINT;
                   end
                 end
        B_NEXT:  if (ch == 4'(NCH - 1)) begin
                   if (evt_in_blk + 9'd1 >= blk_len) st <= B_BTRL;
                   else begin
                     evt_in_blk <= evt_in_blk + 9'd1;
                     st         <= B_DONE;
                   end
                 end else begin
                   ch <= ch + 4'd1;
                   st <= B_CH;
                 end
        B_BTRL:  if (emit) begin
                   evt_in_blk <= '0;
                   block_num  <= block_num + 10'd1;
                   nwords     <= '0;
                   st         <= B_DONE;
                 end
        B_DONE:  st <= B_IDLE;
        default: st <= B_IDLE;
      endcase
    end
  end

  assign busy = (st != B_IDLE);
  assign done = (st == B_DONE);

  // a word once offered stays on the bus until it is taken
  property p_hold;
    @(posedge clk) disable iff (rst) dout_valid && !dout_ready |=> dout_valid && $stable(dout);
  endproperty
  a_hold: assert property (p_hold);

endmodule
