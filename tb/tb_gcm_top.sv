// tb_gcm_top: end-to-end test of the AES-GCM core at its default configuration
// (Fan-Hasan multiplier, LUT S-boxes).
//
// It runs published GCM test vectors for 128-, 192- and 256-bit keys, then a long
// random sequence of messages: random key changes between all key lengths (including
// longer-to-shorter changes that would collide in the final round without the
// stagger), keys that arrive while the previous key schedule is still running,
// encryption and decryption (each ciphertext is decrypted again), messages with no
// AAD or no text, partial last blocks and back-to-back messages. Every output block
// and tag is compared with a reference GCM model; each must appear exactly Nr + 3
// clocks after its input handshake, and streamed AAD/text blocks must be accepted one
// per clock. Finally it sends packets of 1500, 576, 552 and 44 bytes, each under its
// own 128- or 256-bit key, and checks the clocks each packet occupies (n + 7 for n
// blocks, or the key schedule's time for very short packets). Each mechanism is
// counted, and one that never happened counts a failure.
module tb_gcm_top;
  import gcm_pkg::*;
  import gcm_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         in_valid = 0, in_ready;
  data_type_e   in_type;
  logic [127:0] in_data;
  logic [4:0]   in_nbytes;
  logic [255:0] key_in;
  key_type_e    key_type;
  logic [95:0]  iv;
  logic         mode_decrypt;
  logic         out_valid, out_is_tag;
  logic [127:0] out_data;
  logic [4:0]   out_nbytes;

  int checks = 0, failures = 0, cycle = 0;

  gcm_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_type, .in_data, .in_nbytes, .key_in,
               .key_type, .iv, .mode_decrypt, .out_valid, .out_is_tag, .out_data, .out_nbytes);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // ---------------- mechanism counters ----------------
  int n_key [3];
  int n_key_wait = 0, n_stagger = 0, n_h = 0, n_short_after_long = 0;
  int n_enc = 0, n_dec = 0, n_partial = 0, n_no_aad = 0, n_no_text = 0;
  int n_tag_text_adjacent = 0, n_fifo_deep = 0, n_stream_stall = 0;
  int last_tag_cycle = -100;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_type == DT_KEY && !in_ready && dut.ks_busy) n_key_wait++;
    if (dut.u_ctrl.stag_q > 1) n_stagger++;
    if (dut.aes_zero) n_h++;
    if (dut.u_fifo.cnt_q >= 12) n_fifo_deep++;
    if (out_valid && out_is_tag) last_tag_cycle <= cycle;
    if (out_valid && !out_is_tag && cycle - last_tag_cycle <= 3) n_tag_text_adjacent++;
  end

  // ---------------- output checking ----------------
  typedef struct { logic [127:0] data; logic is_tag; int due; } exp_t;
  exp_t exp_q [$];

  always @(negedge clk) begin
    if (out_valid) begin
      exp_t e;
      checks += 3;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %h at %0d", out_data, cycle);
      end else begin
        e = exp_q.pop_front();
        if (out_data !== e.data || out_is_tag !== e.is_tag) begin
          failures++;
          if (failures < 6) $display("MISMATCH at %0d: got %h tag=%0d exp %h tag=%0d",
                                     cycle, out_data, out_is_tag, e.data, e.is_tag);
        end
        if (out_is_tag !== e.is_tag) failures++;
        if (cycle != e.due) begin
          failures++;
          if (failures < 6) $display("LATE/EARLY at %0d, due %0d", cycle, e.due);
        end
      end
    end
  end

  // ---------------- driver ----------------
  int cur_kt = 0;
  int key_hs;
  int n_packet = 0;
  int pkt_bytes [4] = '{1500, 576, 552, 44};

  // present one word and wait for the handshake; returns the handshake cycle
  task automatic send(data_type_e t, logic [127:0] d, logic [4:0] nb, output int hs);
    @(negedge clk);
    in_valid = 1; in_type = t; in_data = d; in_nbytes = nb;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    hs = cycle;
    #1;
    in_valid = 0;
  endtask

  task automatic load_key(logic [255:0] k, int kt);
    int hs;
    key_in = k;
    key_type = key_type_e'(kt);
    if (kt < cur_kt) n_short_after_long++;
    send(DT_KEY, '0, 16, hs);
    key_hs = hs;
    n_key[kt]++;
    cur_kt = kt;
  endtask

  // one message; out[] receives the output blocks, tag the tag
  task automatic message(logic [255:0] k, logic [95:0] v, bit dec,
                         logic [127:0] aad [], int aad_last,
                         logic [127:0] txt [], int txt_last,
                         output logic [127:0] out [], output logic [127:0] tag);
    int hs, nr, nb, stalls;
    nr = 10 + 2 * cur_kt;
    ref_gcm(k, cur_kt, v, dec, aad, aad_last, txt, txt_last, out, tag);
    iv = v;
    mode_decrypt = dec;
    send(DT_IV, '0, 16, hs);
    stalls = 0;
    foreach (aad[i]) begin
      nb = (i == aad.size() - 1) ? aad_last : 16;
      send(DT_AAD, aad[i], 5'(nb), hs);
    end
    foreach (txt[i]) begin
      int prev;
      prev = hs;
      nb = (i == txt.size() - 1) ? txt_last : 16;
      send(DT_TEXT, txt[i], 5'(nb), hs);
      if (hs != prev + 1) stalls++;
      exp_q.push_back('{out[i], 1'b0, hs + nr + 3});
    end
    send(DT_END, '0, 16, hs);
    exp_q.push_back('{tag, 1'b1, hs + nr + 3});
    if (stalls > 0) n_stream_stall++;
    if (dec) n_dec++; else n_enc++;
    if (aad.size() == 0) n_no_aad++;
    if (txt.size() == 0) n_no_text++;
    if ((aad.size() > 0 && aad_last < 16) || (txt.size() > 0 && txt_last < 16)) n_partial++;
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [127:0] aad [], txt [], out [], out2 [], tag, tag2;
    logic [255:0] k;
    logic [95:0]  v;
    key_type = KEY_128; key_in = '0; iv = '0; mode_decrypt = 0;
    in_type = DT_IV; in_data = '0; in_nbytes = 16;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- published GCM vectors (test cases 2, 4, 10 and 16) ----
    load_key('0, 0);
    aad = new[0];
    txt = new[1]; txt[0] = '0;
    message('0, '0, 0, aad, 16, txt, 16, out, tag);
    checks += 2;
    if (out[0] !== 128'h0388dace60b6a392f328c2b971b2fe78) failures++;
    if (tag !== 128'hab6e47d42cec13bdf53a67b21257bddf) failures++;

    aad = new[2];
    aad[0] = 128'hfeedfacedeadbeeffeedfacedeadbeef;
    aad[1] = 128'habaddad2000000000000000000000000;
    txt = new[4];
    txt[0] = 128'hd9313225f88406e5a55909c5aff5269a;
    txt[1] = 128'h86a7a9531534f7da2e4c303d8a318a72;
    txt[2] = 128'h1c3c0c95956809532fcf0e2449a6b525;
    txt[3] = 128'hb16aedf5aa0de657ba637b3900000000;
    k = {128'hfeffe9928665731c6d6a8f9467308308, 128'd0};
    load_key(k, 0);
    message(k, 96'hcafebabefacedbaddecaf888, 0, aad, 4, txt, 12, out, tag);
    checks += 2;
    if (tag !== 128'h5bc94fbc3221a5db94fae95ae7121a47) failures++;
    if (out[0] !== 128'h42831ec2217774244b7221b784d0d49c) failures++;
    k = {192'hfeffe9928665731c6d6a8f9467308308feffe9928665731c, 64'd0};
    load_key(k, 1);
    message(k, 96'hcafebabefacedbaddecaf888, 0, aad, 4, txt, 12, out, tag);
    checks++;
    if (tag !== 128'h2519498e80f1478f37ba55bd6d27618c) failures++;
    k = 256'hfeffe9928665731c6d6a8f9467308308feffe9928665731c6d6a8f9467308308;
    load_key(k, 2);
    message(k, 96'hcafebabefacedbaddecaf888, 0, aad, 4, txt, 12, out, tag);
    checks++;
    if (tag !== 128'h76fc6ece0f4e1768cddf8853bb2d551b) failures++;

    // ---- random traffic ----
    for (int n = 0; n < 40; n++) begin
      int kt, na, nt, la, lt;
      if (n % 4 == 0) begin
        kt = (n % 8 == 4) ? 0 : $urandom_range(0, 2);   // includes long -> short changes
        k  = {rnd128(), rnd128()};
        load_key(k, kt);
      end
      na = (n % 5 == 1) ? 0 : $urandom_range(0, 3);
      nt = (n % 7 == 3) ? 0 : (n % 6 == 0) ? 16 : $urandom_range(1, 5);
      la = (n % 2) ? 16 : $urandom_range(1, 16);
      lt = (n % 3) ? 16 : $urandom_range(1, 16);
      aad = new[na];
      txt = new[nt];
      foreach (aad[i]) aad[i] = rnd128();
      foreach (txt[i]) txt[i] = rnd128();
      v = {$urandom, $urandom, $urandom};
      message(k, v, 0, aad, la, txt, lt, out, tag);
      // decrypt what was just encrypted: plaintext and the same tag must come back
      message(k, v, 1, aad, la, out, lt, out2, tag2);
      checks += 1 + nt;
      if (tag2 !== tag) failures++;
      foreach (out2[i]) if (out2[i] !== (txt[i] & ref_mask((i == nt - 1) ? lt : 16))) failures++;
      // a short message followed at once by a new key: the key must wait for the
      // schedule of the previous one
      if (n % 10 == 9) begin
        aad = new[0]; txt = new[1]; txt[0] = rnd128();
        k = {rnd128(), rnd128()};
        load_key(k, 2);
        message(k, v, 0, aad, 16, txt, 16, out, tag);
        k = {rnd128(), rnd128()};
        load_key(k, 0);
      end
    end
    // ---- packet-size workload: each packet with its own key, text only ----
    // A packet of n blocks should take n + 7 clocks from its KEY handshake to the next
    // one (key, 3 stagger clocks, H, IV, n text blocks, END), unless the key schedule
    // of its key is still running, which bounds short packets from below.
    foreach (pkt_bytes[p]) begin
      int nb, last, t_key, t_next;
      for (int kt = 0; kt < 3; kt += 2) begin
        nb   = (pkt_bytes[p] + 15) / 16;
        last = pkt_bytes[p] - 16 * (nb - 1);
        txt  = new[nb];
        aad  = new[0];
        foreach (txt[i]) txt[i] = rnd128();
        k = {rnd128(), rnd128()};
        load_key(k, kt);
        t_key = key_hs;
        message(k, {$urandom, $urandom, $urandom}, 0, aad, 16, txt, last, out, tag);
        k = {rnd128(), rnd128()};
        load_key(k, kt);
        t_next = key_hs;
        $display("packet %0d bytes, %0d-bit key: %0d blocks in %0d clocks",
                 pkt_bytes[p], 128 + 64 * kt, nb, t_next - t_key);
        checks++;
        if (nb + 7 >= 10 + 2 * kt + 2) begin
          if (t_next - t_key != nb + 7) failures++;
        end else if (t_next - t_key < nb + 7 || t_next - t_key > 10 + 2 * kt + 3) failures++;
        n_packet++;
      end
    end
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end

    // ---- every mechanism must have happened ----
    $display("keys 128/192/256: %0d/%0d/%0d, key waits %0d, stagger cycles %0d, H blocks %0d, longer->shorter %0d",
             n_key[0], n_key[1], n_key[2], n_key_wait, n_stagger, n_h, n_short_after_long);
    $display("enc %0d, dec %0d, partial %0d, no-AAD %0d, no-text %0d, back-to-back messages %0d, deep FIFO %0d, stream stalls %0d",
             n_enc, n_dec, n_partial, n_no_aad, n_no_text, n_tag_text_adjacent, n_fifo_deep, n_stream_stall);
    checks += 14;
    if (n_packet != 8) failures++;
    if (n_key[0] == 0) failures++;
    if (n_key[1] == 0) failures++;
    if (n_key[2] == 0) failures++;
    if (n_key_wait == 0) failures++;
    if (n_stagger == 0) failures++;
    if (n_h == 0) failures++;
    if (n_short_after_long == 0) failures++;
    if (n_enc == 0 || n_dec == 0) failures++;
    if (n_partial == 0) failures++;
    if (n_no_aad == 0 || n_no_text == 0) failures++;
    if (n_tag_text_adjacent == 0) failures++;
    if (n_fifo_deep == 0) failures++;
    if (n_stream_stall != 0) failures++;     // streamed blocks are taken one per clock
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
