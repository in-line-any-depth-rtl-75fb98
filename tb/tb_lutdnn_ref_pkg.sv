// tb_lutdnn_ref_pkg: reference models shared by the testbenches.
//
// - nn2(): a small integer-quantised 2-input neural network (4 ReLU hidden
//   units, one output neuron), its weights derived from the table number. The
//   testbenches "distil" it by evaluating it for every input pair and writing
//   the results as table entries, then compare the hardware with a direct
//   evaluation of the networks.
// - rule_present(): which keys get a rule, so that misses are exercised.
// - final_action(): how the final network's output is mapped to an action.
// - cascade_ref(): direct evaluation of the pairing tree, written as a plain
//   level-by-level loop, independent of the RTL generate structure.
// - packet builders for Ethernet / IPv4 / TCP / UDP frames.
package tb_lutdnn_ref_pkg;

  function automatic int nn2(input int k, input int a, input int b, input int bits);
    int acc, h, w1, w2, bias, v, qmax;
    qmax = (1 << bits) - 1;
    acc = 0;
    for (int j = 0; j < 4; j++) begin
      w1   = ((k * 7 + j * 3 + 1) % 9) - 4;
      w2   = ((k * 5 + j * 11 + 2) % 9) - 4;
      bias = ((k * 3 + j * 5) % 17) - 8;
      h    = w1 * a + w2 * b + bias;
      if (h < 0) h = 0;                       // ReLU
      v    = ((k + j * 5) % 7) - 3;
      acc += v * h;
    end
    acc = (acc >>> 4) + (1 << (bits - 1));
    if (acc < 0) acc = 0;
    if (acc > qmax) acc = qmax;
    return acc;
  endfunction

  function automatic bit rule_present(input int k, input int key, input bit is_final);
    if (is_final) return (key % 11) != 3;
    return (key % 13) != 5;
  endfunction

  // final network output -> {drop, port}: the output's LSB is taken as the
  // class (1 = malicious, drop), the rest chooses one of 48 egress ports.
  function automatic void final_action(input int v, input int bits, output bit drop, output int port);
    drop = v[0];
    port = v % 48;
  endfunction

  // Expected decision of a cascade of n features; tables numbered level by level.
  function automatic void cascade_ref(input int n, input int bits, input int feat[],
                                      output bit drop, output int port, output bit hit);
    int cur[$];
    int nxt[$];
    int k, key, v;
    bit is_final;
    foreach (feat[i]) cur.push_back(feat[i]);
    k = 0;
    drop = 1; port = 0; hit = 0;
    while (cur.size() > 1) begin
      is_final = cur.size() == 2;
      nxt = {};
      for (int i = 0; i + 1 < cur.size(); i += 2) begin
        key = (cur[i] << bits) | cur[i+1];
        if (is_final) begin
          hit = rule_present(k, key, 1);
          if (hit) final_action(nn2(k, cur[i], cur[i+1], bits), bits, drop, port);
          else begin drop = 1; port = 0; end
          if (drop) port = 0;
        end else begin
          v = rule_present(k, key, 0) ? nn2(k, cur[i], cur[i+1], bits) : 0;
          nxt.push_back(v);
        end
        k++;
      end
      if (cur.size() % 2 == 1) nxt.push_back(cur[cur.size()-1]);
      cur = nxt;
    end
  endfunction

  // Key presented to the final table for a feature vector.
  function automatic int final_key(input int n, input int bits, input int feat[]);
    int cur[$];
    int nxt[$];
    int k, key;
    foreach (feat[i]) cur.push_back(feat[i]);
    k = 0;
    while (cur.size() > 2) begin
      nxt = {};
      for (int i = 0; i + 1 < cur.size(); i += 2) begin
        key = (cur[i] << bits) | cur[i+1];
        nxt.push_back(rule_present(k, key, 0) ? nn2(k, cur[i], cur[i+1], bits) : 0);
        k++;
      end
      if (cur.size() % 2 == 1) nxt.push_back(cur[cur.size()-1]);
      cur = nxt;
    end
    return (cur[0] << bits) | cur[1];
  endfunction

  typedef byte unsigned bytes_t[$];

  // Ethernet + IPv4 (+ options) + TCP or UDP; proto other than 6/17 gets no L4.
  function automatic bytes_t build_pkt(input bit [15:0] etype, input int ihl,
                                       input bit [7:0] ttl, input bit [7:0] proto,
                                       input bit [15:0] win, input int payload);
    bytes_t p;
    int l4len, totlen;
    for (int i = 0; i < 6; i++) p.push_back(8'hd0 + 8'(i));   // dst MAC
    for (int i = 0; i < 6; i++) p.push_back(8'h50 + 8'(i));   // src MAC
    p.push_back(etype[15:8]); p.push_back(etype[7:0]);
    if (etype != 16'h0800) begin
      for (int i = 0; i < 28 + payload; i++) p.push_back(8'(i * 3));
      return p;
    end
    l4len  = (proto == 6) ? 20 : (proto == 17) ? 8 : 0;
    totlen = ihl * 4 + l4len + payload;
    p.push_back({4'd4, 4'(ihl)}); p.push_back(8'h00);
    p.push_back(8'(totlen >> 8)); p.push_back(8'(totlen));
    p.push_back(8'h12); p.push_back(8'h34); p.push_back(8'h40); p.push_back(8'h00);
    p.push_back(ttl); p.push_back(proto);
    p.push_back(8'h00); p.push_back(8'h00);
    for (int i = 0; i < 8; i++) p.push_back(8'd10 + 8'(i));  // addresses
    for (int i = 20; i < ihl * 4; i++) p.push_back(8'h01);   // options (NOP)
    if (proto == 6) begin
      p.push_back(8'h04); p.push_back(8'hd2); p.push_back(8'h00); p.push_back(8'h50);
      for (int i = 0; i < 8; i++) p.push_back(8'(i));          // seq, ack
      p.push_back(8'h50); p.push_back(8'h18);
      p.push_back(win[15:8]); p.push_back(win[7:0]);
      p.push_back(8'h00); p.push_back(8'h00); p.push_back(8'h00); p.push_back(8'h00);
    end else if (proto == 17) begin
      p.push_back(8'h13); p.push_back(8'h88); p.push_back(8'h08); p.push_back(8'h68);
      p.push_back(8'(0)); p.push_back(8'(8 + payload)); p.push_back(8'h00); p.push_back(8'h00);
    end
    for (int i = 0; i < payload; i++) p.push_back(8'(i * 7 + 1));
    return p;
  endfunction

endpackage
